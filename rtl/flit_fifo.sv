// flit_fifo: flit buffer of one switch input port.
//
// A synchronous first-word-fall-through FIFO of DEPTH entries of W bits.
// The oldest entry is always visible on rd_data while empty is low; it is
// removed only when rd_en is raised, which the switch does once the next hop
// has accepted the flit. Until then the head entry is the one-flit
// retransmission buffer of the link: if the next switch rejects the flit
// because of a parity error, the same flit is offered again in the next
// cycle.
//
// Timing: a write with wr_en is visible at the head one cycle later; a read
// and a write may happen in the same cycle, also when the FIFO is full, in
// which case the write takes the place freed by the read. Writes to a full
// FIFO (without a read) and reads from an empty one are ignored.
// The depth is this design's choice; the buffers are drawn but not sized in
// the scheme's description. Reset empties the FIFO.
module flit_fifo #(
  parameter int unsigned W     = 67,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage has no reset: an entry is read only after it has been written.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

endmodule
