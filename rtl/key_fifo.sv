// key_fifo: small synchronous FIFO that buffers random key bytes between
// the generator and the cipher engines.
//
// DEPTH entries of WIDTH bits in a register array with read and write
// pointers one bit wider than the address. A push when full is dropped
// (the generator never stalls; it keeps running in the background) and
// counted on `overflow`. The head entry is visible on `dout` whenever
// `empty` is low (first-word fall-through); `pop` removes it. The document
// says only "a small FIFO"; depth and full behaviour are this design's
// choice.
module key_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) begin
        mem[wptr[AW-1:0]] <= din;
        wptr <= wptr + 1'b1;
      end
      if (do_pop) rptr <= rptr + 1'b1;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) pop |-> !empty)
    else $error("key_fifo: pop while empty");

endmodule
