// Coefficient register array of one folded processor. Holds the 32 noise
// shaping filter coefficients, the spike detection threshold and the spike
// length, written once at configuration through `cfg` (one write per cycle).
// Address map (this design's own): 0..31 coefficient k (low 9 bits of data),
// 32 threshold (16 bits), 33 spike length (low 6 bits; 0 is stored as 1 and
// values above 32 as 32). Reset values: coefficients 0, threshold 0xFFFF,
// spike length 32. Outputs are registers. That threshold and coefficients sit
// in a register array loaded at configuration follows the published design;
// the map, the spike-length register and the reset values are this design's.
module coeff_reg_array
  import ssp_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  output coef_t            coef [N_TAPS],
  output logic [THR_W-1:0] thr,
  output logic [LEN_W-1:0] spk_len
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) coef[k] <= '0;
      thr     <= '1;
      spk_len <= LEN_W'(32);
    end else if (cfg.we) begin
      if (cfg.addr < CFG_ADDR_W'(N_TAPS))
        coef[cfg.addr[$clog2(N_TAPS)-1:0]] <= coef_t'(cfg.data[COEF_W-1:0]);
      else if (cfg.addr == ADDR_THR)
        thr <= cfg.data[THR_W-1:0];
      else if (cfg.addr == ADDR_LEN) begin
        if (cfg.data[LEN_W-1:0] == '0)             spk_len <= LEN_W'(1);
        else if (cfg.data[LEN_W-1:0] > LEN_W'(32)) spk_len <= LEN_W'(32);
        else                                       spk_len <= cfg.data[LEN_W-1:0];
      end
    end
  end

endmodule
