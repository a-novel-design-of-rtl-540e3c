// tb_ftfa: exhaustive check of the fault tolerant full adder.
// For every input and every stuck-at pattern on the inner adder's sum and
// carry, the corrected outputs sumf/coutf must equal a + b + cin, and fs/fc
// must flag exactly the outputs the fault made wrong. Also the worked
// example: inputs 1,1,0 give sum 0 and carry 1 with no flags.
module tb_ftfa;
  import csd_pkg::*;
  logic a, b, cin, sumf, coutf, fs, fc;
  fa_fault_t fault;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ftfa dut (.a(a), .b(b), .cin(cin), .fault(fault),
            .sumf(sumf), .coutf(coutf), .fs(fs), .fc(fc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ref_sum;
    for (int v = 0; v < 8; v++) begin
      for (int f = 0; f < 16; f++) begin
        {a, b, cin} = 3'(v);
        fault = fa_fault_t'(4'(f));
        @(posedge clk);
        ref_sum = 2'(int'(a) + int'(b) + int'(cin));
        checks++;
        if ({coutf, sumf} !== ref_sum) begin
          failures++;
          $display("FAIL abc=%03b fault=%04b: coutf=%b sumf=%b", v[2:0], f[3:0], coutf, sumf);
        end
        checks++;
        if (fs !== (fault.sum_en && fault.sum_val != ref_sum[0]) ||
            fc !== (fault.cout_en && fault.cout_val != ref_sum[1])) begin
          failures++;
          $display("FAIL abc=%03b fault=%04b: fs=%b fc=%b", v[2:0], f[3:0], fs, fc);
        end
      end
    end
    // worked example: A=1, B=1, Cin=0 -> sumf=0, coutf=1, flags clear
    {a, b, cin} = 3'b110;
    fault = '0;
    @(posedge clk);
    checks++;
    if (sumf !== 1'b0 || coutf !== 1'b1 || fs !== 1'b0 || fc !== 1'b0) begin
      failures++;
      $display("FAIL example 110: sumf=%b coutf=%b fs=%b fc=%b", sumf, coutf, fs, fc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
