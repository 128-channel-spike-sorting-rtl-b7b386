// Testbench of coder_packer: random finished feature rows are coded and packed;
// the record (one cycle later) must match the reference packing, including the
// global channel index SSP_ID*N_CH + channel.
module tb_coder_packer;
  import ssp_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_CH = 16, SSP_ID = 5;
  logic clk = 0, rst_n = 0, done = 0, rec_valid;
  feat_row_t feat;
  logic [3:0] ch;
  spike_rec_t rec;
  int checks = 0, failures = 0;

  coder_packer #(.N_CH(N_CH), .SSP_ID(SSP_ID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fmax, fmin, rmax, t, c;
    bit d;
    logic [71:0] expv;
    feat = '0; ch = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      fmax = int'($urandom_range(0, 4194303)) - 2097152;
      fmin = int'($urandom_range(0, 4194303)) - 2097152;
      rmax = int'($urandom_range(0, 511)) - 256;
      t = int'($urandom_range(0, 65535)); c = int'($urandom_range(0, 15));
      d = $urandom_range(0, 1);
      feat.fmax = feat_t'(fmax); feat.fmin = feat_t'(fmin); feat.rmax = sample_t'(rmax);
      feat.ts = 16'(t); ch = 4'(c); done = d;
      expv = pack(fmax, fmin, rmax, t, SSP_ID * N_CH + c);
      @(negedge clk);
      done = 0;
      checks++;
      if (rec_valid != d || (d && rec != expv)) begin
        failures++;
        $display("i=%0d valid=%b rec=%h exp=%h", i, rec_valid, rec, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
