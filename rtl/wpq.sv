// wpq: write pending queue, the ADR (asynchronous DRAM refresh) domain that
// holds encrypted leaf data on its way to memory.
//
// A DEPTH-entry FIFO of W-bit entries with valid/ready on both sides. An
// entry pushed here counts as persistent: the queue is cleared only by the
// power-on reset of the persistent state (nv_rst_n), not by the crash reset,
// and drains to memory after a crash like before it. empty tells the
// recovery controller that every pending store has reached memory.
// DEPTH = 8 follows the evaluated configuration; the FIFO organisation and
// the handshake are this design's choices.
module wpq #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         nv_rst_n,
  input  logic         push_valid,
  output logic         push_ready,
  input  logic [W-1:0] push_data,
  output logic         pop_valid,
  input  logic         pop_ready,
  output logic [W-1:0] pop_data,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty      = (count == 0);
  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign push_ready = !full;
  assign pop_valid  = !empty;
  assign pop_data   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge nv_rst_n) begin
    if (!nv_rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= bump(wr_ptr);
      if (do_pop)  rd_ptr <= bump(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  // A push is never offered to a full queue by a well-behaved producer that
  // checks push_ready; popping an empty queue cannot happen by construction.
  property p_no_overflow;
    @(posedge clk) disable iff (!nv_rst_n) count <= ($clog2(DEPTH+1))'(DEPTH);
  endproperty
  assert property (p_no_overflow);

endmodule
