// packet_queue: one byte-wide packet queue (1 kB by default).
//
// The chip holds a TX and an RX queue between the network layer running on
// the microcontroller and the data-link layer, placed in a small power domain
// of their own so each side can fill or drain it while the other sleeps. This
// block is a first-in first-out buffer of DEPTH words of W bits, stored in an
// array that maps to one two-port memory. The write side and the read side
// are independent. A read returns its word on the clock edge after `rd_en`
// (`rd_data` then holds it until the next read). Writes to a full queue and
// reads from an empty one are ignored. `level` is the number of words stored.
// The size follows the published design (1 kB); the FIFO organisation, byte width
// and the handshake are this implementation's choices.
module packet_queue #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_wr, do_rd;

  assign level = wr_ptr - rd_ptr;
  assign full  = (level == (AW+1)'(DEPTH));
  assign empty = (level == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      rd_data <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) begin
        rd_ptr  <= rd_ptr + 1'b1;
        rd_data <= mem[rd_ptr[AW-1:0]];
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
