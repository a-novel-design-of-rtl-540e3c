// tb_fa_dft: exhaustive check of the full adder with fault checker.
// Every input combination is combined with every stuck-at fault pattern on
// the adder's sum and carry nets (none, single and double). The outputs
// must show the forced values, and fs/fc must be 1 exactly when the forced
// sum/carry differs from the arithmetically correct one.
module tb_fa_dft;
  import csd_pkg::*;
  logic a, b, cin, sum, cout, fs, fc;
  fa_fault_t fault;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_fs = 0, n_fc = 0, n_double = 0;

  fa_dft dut (.a(a), .b(b), .cin(cin), .fault(fault),
              .sum(sum), .cout(cout), .fs(fs), .fc(fc));

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
    logic exp_s, exp_c;
    for (int v = 0; v < 8; v++) begin
      for (int f = 0; f < 16; f++) begin
        {a, b, cin} = 3'(v);
        fault = fa_fault_t'(4'(f));
        @(posedge clk);
        ref_sum = 2'(int'(a) + int'(b) + int'(cin));
        exp_s = fault.sum_en  ? fault.sum_val  : ref_sum[0];
        exp_c = fault.cout_en ? fault.cout_val : ref_sum[1];
        checks++;
        if (sum !== exp_s || cout !== exp_c ||
            fs !== (exp_s != ref_sum[0]) || fc !== (exp_c != ref_sum[1])) begin
          failures++;
          $display("FAIL abc=%03b fault=%04b: sum=%b cout=%b fs=%b fc=%b", v[2:0], f[3:0], sum, cout, fs, fc);
        end
        n_fs += int'(fs);
        n_fc += int'(fc);
        n_double += int'(fs & fc);
      end
    end
    // each input sees 4 sum-wrong, 4 carry-wrong and 1 double-wrong pattern
    checks++;
    if (n_fs != 32 || n_fc != 32 || n_double != 8) begin
      failures++;
      $display("FAIL flag totals fs=%0d fc=%0d double=%0d", n_fs, n_fc, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
