// Command decoder and assignment: turns the 1-bit serial programming signal into
// register writes for the coefficient register arrays of the folded processors.
//
// Frame (this design's own format), one bit per clock, MSB first:
//   1 start bit ('1'; the line idles at '0'),
//   1 broadcast bit, ID_W bits of processor index,
//   6 bits of register address, 16 bits of data.
// On the cycle after the last data bit `cfg.we` is high for one cycle together
// with `sel`, a one-hot mask of the target processor or all ones for a
// broadcast. A new frame may start on the cycle after the last data bit.
// The published design shows only this block's name and its 1-bit serial
// input; the frame format and the broadcast option are this design's own.
module cmd_decoder
  import ssp_pkg::*;
#(
  parameter int unsigned N_SSP = 8,
  localparam int unsigned ID_W = (N_SSP > 1) ? $clog2(N_SSP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prog_in,
  output cfg_wr_t          cfg,
  output logic [N_SSP-1:0] sel
);
  localparam int unsigned BODY_W = 1 + ID_W + CFG_ADDR_W + CFG_DATA_W;
  localparam int unsigned CNT_W  = $clog2(BODY_W + 1);

  typedef enum logic {IDLE, SHIFT} state_t;

  state_t            state;
  logic [BODY_W-2:0] sh;
  logic [CNT_W-1:0]  cnt;

  logic [BODY_W-1:0] body;   // frame including the bit on prog_in now
  logic              bcast;
  logic [ID_W-1:0]   id;

  assign body        = {sh, prog_in};
  assign {bcast, id} = body[BODY_W-1 -: ID_W+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sh    <= '0;
      cnt   <= '0;
      cfg   <= '0;
      sel   <= '0;
    end else begin
      cfg.we <= 1'b0;
      unique case (state)
        IDLE: if (prog_in) begin
          state <= SHIFT;
          cnt   <= '0;
        end
        SHIFT: begin
          sh  <= body[BODY_W-2:0];
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(BODY_W - 1)) begin
            state    <= IDLE;
            cfg.we   <= 1'b1;
            cfg.addr <= body[CFG_DATA_W +: CFG_ADDR_W];
            cfg.data <= body[CFG_DATA_W-1:0];
            for (int i = 0; i < N_SSP; i++)
              sel[i] <= bcast || (id == ID_W'(i));
          end
        end
      endcase
    end
  end

endmodule
