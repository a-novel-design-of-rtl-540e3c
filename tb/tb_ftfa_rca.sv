// tb_ftfa_rca: ripple-carry adder of fault tolerant full adders.
// Part 1 applies every a, b, cin without faults; part 2 applies random
// operands with random stuck-at faults in random bit positions. The sum
// and carry out must always equal a + b + cin, and fs[i]/fc[i] must flag
// exactly the bits whose forced value disagrees with the true sum/carry of
// that bit (worked out from partial integer sums).
module tb_ftfa_rca;
  import csd_pkg::*;
  localparam int N = 4;
  logic [N-1:0] a, b, sum, fs, fc;
  logic cin, cout;
  fa_fault_t [N-1:0] fault;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ftfa_rca #(.N(N)) dut (.a(a), .b(b), .cin(cin), .fault(fault),
                         .sum(sum), .cout(cout), .fs(fs), .fc(fc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int total, mask, ci, co;
    logic si;
    logic [N-1:0] exp_fs, exp_fc;
    total = int'(a) + int'(b) + int'(cin);
    for (int i = 0; i < N; i++) begin
      mask = (1 << i) - 1;
      ci = ((int'(a) & mask) + (int'(b) & mask) + int'(cin)) >> i;
      si = a[i] ^ b[i] ^ ci[0];
      co = ((int'(a) & (2 * mask + 1)) + (int'(b) & (2 * mask + 1)) + int'(cin)) >> (i + 1);
      exp_fs[i] = fault[i].sum_en  && (fault[i].sum_val  != si);
      exp_fc[i] = fault[i].cout_en && (fault[i].cout_val != co[0]);
    end
    checks++;
    if ({cout, sum} !== (N+1)'(total)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b fault=%h: got %b_%h", a, b, cin, fault, cout, sum);
    end
    checks++;
    if (fs !== exp_fs || fc !== exp_fc) begin
      failures++;
      $display("FAIL flags a=%h b=%h cin=%b fault=%h: fs=%b/%b fc=%b/%b", a, b, cin, fault, fs, exp_fs, fc, exp_fc);
    end
  endtask

  initial begin
    fault = '0;
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {a, b, cin} = (2*N+1)'(v);
      @(posedge clk);
      check();
    end
    for (int k = 0; k < 5000; k++) begin
      a = N'($urandom);
      b = N'($urandom);
      cin = 1'($urandom);
      for (int i = 0; i < N; i++)
        fault[i] = ($urandom_range(0, 2) == 0) ? fa_fault_t'(4'($urandom)) : '0;
      @(posedge clk);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
