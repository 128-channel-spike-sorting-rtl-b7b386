// Systolic cache buffer: DEPTH rows of W-bit registers that shift by one row on
// every enabled cycle. The last row (row_out) belongs to the channel being
// processed now; the processing units return its updated contents on row_in,
// which enters the first row. With DEPTH equal to the number of folded
// channels, a channel's row comes back to the output exactly when that channel's
// next sample arrives, so no addressing or read/write scheduling is needed. The
// row-by-row shifting of N rows follows the published design; closing the
// buffer into a ring through the processing units and resetting the rows to
// zero are this design's reading of it. row_out is a register output.
module scb #(
  parameter int unsigned W     = 279,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] row_in,
  output logic [W-1:0] row_out
);
  logic [W-1:0] rows [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) rows[i] <= '0;
    end else if (en) begin
      rows[0] <= row_in;
      for (int i = 1; i < DEPTH; i++) rows[i] <= rows[i-1];
    end
  end

  assign row_out = rows[DEPTH-1];

endmodule
