// System control unit of one folded processor. Follows the channel-interleaved
// schedule: on every enabled cycle one sample of channel `ch` is processed, ch
// counting 0..N_CH-1 from reset. `ts` counts complete rounds of N_CH samples
// (one round per sampling period), giving the 16-bit timing information stored
// with each spike; it wraps. Both outputs are registers and describe the
// current cycle. The interleaved schedule (one channel per clock, N_CH clocks
// per sampling period) follows the published design, which only names this
// unit; its counters and the timestamp definition are this design's own.
module sys_ctrl #(
  parameter int unsigned N_CH = 16,
  parameter int unsigned TS_W = 16,
  localparam int unsigned CH_W = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [CH_W-1:0] ch,
  output logic [TS_W-1:0] ts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch <= '0;
      ts <= '0;
    end else if (en) begin
      if (ch == CH_W'(N_CH - 1)) begin
        ch <= '0;
        ts <= ts + 1'b1;
      end else begin
        ch <= ch + 1'b1;
      end
    end
  end

endmodule
