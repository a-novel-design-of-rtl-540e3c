// tb_csd_ftfa_top: end-to-end test of both recoders at their default size.
//
// Every cycle a new two's complement input (with initial carry) and a new
// redundant binary input are driven, each with a random stuck-at fault
// pattern for its fault tolerant carry chain. The two's complement result
// is checked one cycle later and the RB result three cycles later, each for
// legal non-adjacent digits, the right value and carry, and fault flags
// that point at exactly the faulty chain bits. The test counts how often
// each mechanism of the design happened and fails if one never did:
// a sum fault repaired, a carry fault repaired, a double fault (sum and
// carry of one adder) repaired, a -1 digit produced from a run of ones,
// a +1 digit, an initial carry of 1, and back-to-back results from the
// three-stage pipeline. It finishes with the worked example x = 10101.
module tb_csd_ftfa_top;
  import csd_pkg::*;
  localparam int N = 4;
  localparam int NV = 4000;
  logic clk = 1'b0, rst_n;
  logic [N:0] tc_x;
  logic tc_cin, tc_cout, rb_cout;
  fa_fault_t [N-1:0] tc_fault, rb_fault;
  sd_digit_t [N-1:0] tc_y, rb_y;
  logic [N-1:0] tc_fs, tc_fc, rb_fs, rb_fc;
  sd_digit_t [N:0] rb_in;
  int checks = 0, failures = 0;
  int n_sum_fix = 0, n_cout_fix = 0, n_double = 0, n_neg = 0, n_pos = 0;
  int n_cin = 0, n_rb_stream = 0;

  sd_digit_t [N:0]   rb_hist [NV];
  fa_fault_t [N-1:0] rbf_hist [NV + 3];

  csd_ftfa_top dut (
    .clk(clk), .rst_n(rst_n),
    .tc_x(tc_x), .tc_cin(tc_cin), .tc_fault(tc_fault),
    .tc_y(tc_y), .tc_cout(tc_cout), .tc_fs(tc_fs), .tc_fc(tc_fc),
    .rb_in(rb_in), .rb_fault(rb_fault),
    .rb_y(rb_y), .rb_cout(rb_cout), .rb_fs(rb_fs), .rb_fc(rb_fc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic int rb_value(sd_digit_t [N:0] r);
    int v = 0;
    for (int i = 0; i <= N; i++) v += (int'(r[i].d) - int'(r[i].s)) * (1 << i);
    return v;
  endfunction

  function automatic fa_fault_t [N-1:0] random_faults();
    fa_fault_t [N-1:0] f;
    for (int i = 0; i < N; i++)
      f[i] = ($urandom_range(0, 2) == 0) ? fa_fault_t'(4'($urandom)) : '0;
    return f;
  endfunction

  task automatic count_events(sd_digit_t [N-1:0] yo, logic [N-1:0] fso, logic [N-1:0] fco);
    for (int i = 0; i < N; i++) begin
      n_sum_fix  += int'(fso[i]);
      n_cout_fix += int'(fco[i]);
      n_double   += int'(fso[i] & fco[i]);
      n_neg      += int'(yo[i].s);
      n_pos      += int'(yo[i].d);
    end
  endtask

  task automatic require(string what, int n);
    checks++;
    $display("%-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [N:0] tx;
    logic tci;
    fa_fault_t [N-1:0] tf;
    rst_n = 1'b0;
    tc_x = '0; tc_cin = 1'b0; tc_fault = '0;
    rb_in = '0; rb_fault = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NV + 2; k++) begin
      // two's complement path: new input every cycle, checked after the edge
      tx = (N+1)'($urandom);
      tci = ($urandom_range(0, 3) == 0);
      tf = (k < 100) ? '0 : random_faults();
      tc_x = tx; tc_cin = tci; tc_fault = tf;
      // RB path: input k now, fault for the result of input k-2
      if (k < NV) begin
        for (int i = 0; i <= N; i++)
          rb_hist[k][i] = sd_digit_t'(2'($urandom_range(0, 2)));
        rb_in = rb_hist[k];
      end
      rbf_hist[k] = (k < 100) ? '0 : random_faults();
      rb_fault = rbf_hist[k];
      @(posedge clk);
      #1;
      checks++;
      if (check_csd(tx, tci, tf, tc_y, tc_cout, tc_fs, tc_fc) != 0) begin
        failures++;
        $display("FAIL tc x=%b cin=%b fault=%h: y=%b cout=%b fs=%b fc=%b",
                 tx, tci, tf, tc_y, tc_cout, tc_fs, tc_fc);
      end
      count_events(tc_y, tc_fs, tc_fc);
      n_cin += int'(tci);
      if (k >= 2 && k - 2 < NV) begin
        logic [N:0] xv;
        xv = (N+1)'(rb_value(rb_hist[k-2]));
        checks++;
        if (check_csd(xv, 1'b0, rbf_hist[k], rb_y, rb_cout, rb_fs, rb_fc) != 0) begin
          failures++;
          $display("FAIL rb input %0d rb=%b: y=%b cout=%b fs=%b fc=%b",
                   k - 2, rb_hist[k-2], rb_y, rb_cout, rb_fs, rb_fc);
        end
        else n_rb_stream++;
        count_events(rb_y, rb_fs, rb_fc);
      end
      @(negedge clk);
    end
    // worked example: 10101 with carry 0 -> +1 at bits 0 and 2
    tc_x = 5'b10101; tc_cin = 1'b0; tc_fault = '0;
    @(posedge clk);
    #1;
    checks++;
    if (tc_y !== {2'b00, 2'b01, 2'b00, 2'b01}) begin
      failures++;
      $display("FAIL example 10101: y=%b", tc_y);
    end
    require("sum faults repaired", n_sum_fix);
    require("carry faults repaired", n_cout_fix);
    require("double faults repaired", n_double);
    require("-1 digits (runs of ones)", n_neg);
    require("+1 digits", n_pos);
    require("initial carry of 1", n_cin);
    require("back-to-back RB results", n_rb_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
