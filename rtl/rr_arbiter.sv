// rr_arbiter: round-robin arbiter for N requesters.
//
// Combinationally grants the first requester at or after the priority
// pointer (wrapping around). When advance is high and a grant is given, the
// pointer moves to the requester after the granted one at the clock edge, so
// a requester that was just served has the lowest priority next time. The
// router's control logic uses it to pick which waiting header is routed next,
// and each output port uses it to share the physical link among its virtual
// channels. The round-robin policy is this design's choice; the reference
// only states that an arbitration module picks the packet to route.
//
// Interface: req (N bits) in; gnt (one-hot), gnt_idx and any out, all in the
// same cycle. Reset puts the pointer at requester 0.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                          clock,
  input  logic                          reset,
  input  logic [N-1:0]                  req,
  input  logic                          advance,
  output logic [N-1:0]                  gnt,
  output logic [(N>1?$clog2(N):1)-1:0]  gnt_idx,
  output logic                          any
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = int'(ptr) + k;
      if (idx >= N) idx = idx - N;
      if (!any && req[idx]) begin
        any      = 1'b1;
        gnt_idx  = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      ptr <= '0;
    end else if (advance && any) begin
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clock) disable iff (reset) any |-> $onehot(gnt));

endmodule
