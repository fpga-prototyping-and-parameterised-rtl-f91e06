// flit_fifo: circular buffer holding the flits of one virtual channel.
//
// Every input port of the router has one of these per virtual channel (the
// "B" buffers at each port). It stores up to FBD flits of FDW bits. A write
// (wr) and a read (rd) may happen in the same cycle. The head flit is always
// visible on dout while empty is low; rd removes it at the clock edge. full
// and empty come straight from a registered occupancy count, so a sender may
// use !full as a same-cycle credit without a combinational path through this
// buffer. Writing a full buffer or reading an empty one is a protocol error
// (asserted) and is ignored.
//
// Buffer depth and flit width are the two buffer parameters the design is
// evaluated over; the defaults are those of the reference router simulation
// (8-bit flits, 16 flits deep). The storage is a plain array so synthesis may
// map it to distributed RAM. Reset is asynchronous and active high.
module flit_fifo #(
  parameter int FDW = 8,
  parameter int FBD = 16
) (
  input  logic           clock,
  input  logic           reset,
  input  logic           wr,
  input  logic [FDW-1:0] din,
  input  logic           rd,
  output logic [FDW-1:0] dout,
  output logic           empty,
  output logic           full
);

  localparam int PW = (FBD > 1) ? $clog2(FBD) : 1;
  localparam int CW = $clog2(FBD + 1);

  logic [FDW-1:0] mem [FBD];
  logic [PW-1:0]  wptr, rptr;
  logic [CW-1:0]  count;

  logic do_wr, do_rd;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  assign empty = (count == '0);
  assign full  = (count == CW'(FBD));
  assign dout  = mem[rptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(FBD - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clock) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clock) disable iff (reset) wr |-> !full);
  a_no_underflow: assert property (@(posedge clock) disable iff (reset) rd |-> !empty);

endmodule
