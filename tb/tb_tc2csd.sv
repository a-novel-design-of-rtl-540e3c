// tb_tc2csd: two's complement to CSD recoder with fault tolerant chain.
//
// Inputs are driven on the falling clock edge and the registered outputs
// are checked after the next rising edge (latency one cycle); just before
// that edge the outputs must still hold the previous result. A result is
// accepted when
//   - every digit is legal ({s,d} != 11) and no two adjacent digits are
//     non-zero (this, with the value, fixes the digits uniquely),
//   - sum y(i)2^i = x[N-1:0] + cin - 2^N*cout,
//   - cout is the carry out of the integer sum x[N:1] + x[N-1:0] + cin,
//   - fs/fc flag exactly the chain bits whose injected stuck value differs
//     from the true sum/carry of that bit.
// All 64 (x, cin) pairs run first without faults, then with random faults,
// then the worked example x = 10101, cin = 0 (digits +1,0,+1,0 from bit 0).
module tb_tc2csd;
  import csd_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  logic [N:0] x;
  logic cin, cout;
  fa_fault_t [N-1:0] fault;
  sd_digit_t [N-1:0] y;
  logic [N-1:0] fs, fc;
  int checks = 0, failures = 0;

  tc2csd #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .x(x), .cin(cin), .fault(fault),
                       .y(y), .cout(cout), .fs(fs), .fc(fc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns the number of failed checks for one result
  function automatic int check_csd(logic [N:0] xi, logic ci, fa_fault_t [N-1:0] f,
                                   sd_digit_t [N-1:0] yo, logic co,
                                   logic [N-1:0] fso, logic [N-1:0] fco);
    int bad = 0, val = 0, hi, lo, mask, c_in_i, c_out_i;
    logic s_i;
    logic [N-1:0] efs, efc;
    hi = int'(xi[N:1]);
    lo = int'(xi[N-1:0]);
    for (int i = 0; i < N; i++) begin
      if (yo[i] == 2'b11) bad++;
      if (i > 0 && yo[i] != 2'b00 && yo[i-1] != 2'b00) bad++;
      val += (int'(yo[i].d) - int'(yo[i].s)) * (1 << i);
      mask = (1 << i) - 1;
      c_in_i  = ((hi & mask) + (lo & mask) + int'(ci)) >> i;
      c_out_i = ((hi & (2*mask+1)) + (lo & (2*mask+1)) + int'(ci)) >> (i + 1);
      s_i = xi[i+1] ^ xi[i] ^ c_in_i[0];
      efs[i] = f[i].sum_en  && (f[i].sum_val  != s_i);
      efc[i] = f[i].cout_en && (f[i].cout_val != c_out_i[0]);
    end
    if (val != lo + int'(ci) - (int'(co) << N)) bad++;
    if (int'(co) != ((hi + lo + int'(ci)) >> N)) bad++;
    if (fso !== efs || fco !== efc) bad++;
    return bad;
  endfunction

  task automatic apply(logic [N:0] xi, logic ci, fa_fault_t [N-1:0] f);
    sd_digit_t [N-1:0] y_prev;
    int bad;
    @(negedge clk);
    y_prev = y;
    x = xi;
    cin = ci;
    fault = f;
    #1;
    checks++;
    if (y !== y_prev) begin
      failures++;
      $display("FAIL output changed before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    bad = check_csd(xi, ci, f, y, cout, fs, fc);
    if (bad != 0) begin
      failures++;
      $display("FAIL x=%b cin=%b fault=%h: y=%b cout=%b fs=%b fc=%b", xi, ci, f, y, cout, fs, fc);
    end
  endtask

  initial begin
    fa_fault_t [N-1:0] f;
    rst_n = 1'b0;
    x = '0;
    cin = 1'b0;
    fault = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== '0 || cout !== 1'b0 || fs !== '0 || fc !== '0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    for (int v = 0; v < (1 << (N + 2)); v++)
      apply((N+1)'(v >> 1), v[0], '0);
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < N; i++)
        f[i] = ($urandom_range(0, 2) == 0) ? fa_fault_t'(4'($urandom)) : '0;
      apply((N+1)'($urandom), 1'($urandom), f);
    end
    // sign-extended input, cin = 0: digits give the two's complement value
    for (int v = -8; v < 8; v++) begin
      int val;
      apply((N+1)'(v), 1'b0, '0);
      val = 0;
      for (int i = 0; i < N; i++) val += (int'(y[i].d) - int'(y[i].s)) * (1 << i);
      checks++;
      if (val != v) begin
        failures++;
        $display("FAIL signed value %0d recoded as %0d", v, val);
      end
    end
    // worked example
    apply(5'b10101, 1'b0, '0);
    checks++;
    if (y !== {2'b00, 2'b01, 2'b00, 2'b01}) begin
      failures++;
      $display("FAIL example 10101: y=%b", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
