// tb_rb2csd: three-stage redundant binary to CSD recoder.
//
// A new RB number is driven on every falling clock edge with no gaps, so
// the pipeline is kept full. The result of the number driven before rising
// edge k must appear after rising edge k+2 (three register stages), and it
// is computed with the fault pattern driven just before edge k+2, the cycle
// in which the recoder works on it. Each result is checked for legal,
// non-adjacent digits, for sum y(i)2^i = X[N-1:0] - 2^N*cout with
// X = (D - S) mod 2^(N+1) worked out from the digits, and for fault flags
// that match the injected stuck values. All 3^5 legal inputs are streamed
// twice (without and with random faults) and then random ones; numbers
// that fit in N-bit two's complement must come out with their exact value.
module tb_rb2csd;
  import csd_pkg::*;
  localparam int N = 4;
  localparam int LAT = 3;
  localparam int NV = 2 * 243 + 1000;
  logic clk = 1'b0, rst_n;
  sd_digit_t [N:0] rb;
  fa_fault_t [N-1:0] fault;
  sd_digit_t [N-1:0] y;
  logic cout;
  logic [N-1:0] fs, fc;
  int checks = 0, failures = 0, exact = 0;

  sd_digit_t [N:0]   in_hist [NV];
  fa_fault_t [N-1:0] f_hist  [NV + LAT];

  rb2csd #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .rb(rb), .fault(fault),
                       .y(y), .cout(cout), .fs(fs), .fc(fc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_digit_t [N:0] rb_of_code(int code);
    sd_digit_t [N:0] r;
    for (int i = 0; i <= N; i++) begin
      r[i] = (code % 3 == 0) ? 2'b00 : (code % 3 == 1) ? 2'b01 : 2'b10;
      code = code / 3;
    end
    return r;
  endfunction

  function automatic int rb_value(sd_digit_t [N:0] r);
    int v = 0;
    for (int i = 0; i <= N; i++) v += (int'(r[i].d) - int'(r[i].s)) * (1 << i);
    return v;
  endfunction

  function automatic int check_csd(logic [N:0] xi, fa_fault_t [N-1:0] f,
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
      c_in_i  = ((hi & mask) + (lo & mask)) >> i;
      c_out_i = ((hi & (2*mask+1)) + (lo & (2*mask+1))) >> (i + 1);
      s_i = xi[i+1] ^ xi[i] ^ c_in_i[0];
      efs[i] = f[i].sum_en  && (f[i].sum_val  != s_i);
      efc[i] = f[i].cout_en && (f[i].cout_val != c_out_i[0]);
    end
    if (val != lo - (int'(co) << N)) bad++;
    if (int'(co) != ((hi + lo) >> N)) bad++;
    if (fso !== efs || fco !== efc) bad++;
    return bad;
  endfunction

  initial begin
    rst_n = 1'b0;
    rb = '0;
    fault = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== '0 || cout !== 1'b0 || fs !== '0 || fc !== '0) begin
      failures++;
      $display("FAIL reset state");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NV + LAT; k++) begin
      // drive input k and the fault for the result of input k-2
      if (k < NV) begin
        if (k < 243)          in_hist[k] = rb_of_code(k);
        else if (k < 2 * 243) in_hist[k] = rb_of_code(k - 243);
        else                  in_hist[k] = rb_of_code(int'($urandom_range(0, 242)));
        rb = in_hist[k];
      end
      for (int i = 0; i < N; i++)
        f_hist[k][i] = (k >= 243 + 2 && $urandom_range(0, 2) == 0) ? fa_fault_t'(4'($urandom)) : '0;
      fault = f_hist[k];
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        int j, v, val, bad;
        logic [N:0] xv;
        j = k - (LAT - 1);
        if (j < NV) begin
          v = rb_value(in_hist[j]);
          xv = (N+1)'(v);
          bad = check_csd(xv, f_hist[k], y, cout, fs, fc);
          checks++;
          if (bad != 0) begin
            failures++;
            $display("FAIL input %0d rb=%b (value %0d): y=%b cout=%b fs=%b fc=%b",
                     j, in_hist[j], v, y, cout, fs, fc);
          end
          if (v >= -(1 << (N-1)) && v < (1 << (N-1))) begin
            val = 0;
            for (int i = 0; i < N; i++) val += (int'(y[i].d) - int'(y[i].s)) * (1 << i);
            checks++;
            exact++;
            if (val != v) begin
              failures++;
              $display("FAIL value %0d recoded as %0d", v, val);
            end
          end
        end
      end
      @(negedge clk);
    end
    // five +1 digits (value 31, beyond four CSD digits): X = 11111, which
    // recodes to -1 at bit 0 with final carry 1: X[3:0] - 16*cout = 15 - 16
    rb = {5{2'b01}};
    fault = '0;
    repeat (LAT) @(posedge clk);
    #1;
    checks++;
    if (y !== {2'b00, 2'b00, 2'b00, 2'b10} || cout !== 1'b1) begin
      failures++;
      $display("FAIL example 01,01,01,01,01: y=%b cout=%b", y, cout);
    end
    $display("results with an exact N-digit value: %0d", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
