// Testbench of scb: a row written on row_in must come out of row_out exactly
// DEPTH enabled cycles later, cycles with en low must not move the rows, and
// reset clears all rows.
module tb_scb;
  localparam int W = 12, DEPTH = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] row_in, row_out;
  int checks = 0, failures = 0;

  scb #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] q[$];
    row_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < DEPTH; i++) q.push_back('0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      row_in = W'($urandom);
      checks++;
      if (row_out != q[0]) begin
        failures++;
        $display("cycle %0d row_out=%h expected %h", i, row_out, q[0]);
      end
      if (en) begin
        void'(q.pop_front());
        q.push_back(row_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
