// tb_rb2tc: every legal 5-digit redundant binary number (3^5 of them) is
// converted; the result must equal (sum of digit * 2^i) mod 32.
module tb_rb2tc;
  import csd_pkg::*;
  localparam int W = 5;
  sd_digit_t [W-1:0] rb;
  logic [W-1:0] x;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  rb2tc #(.W(W)) dut (.rb(rb), .x(x));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code, val, dig;
    for (int v = 0; v < 243; v++) begin
      code = v;
      val = 0;
      for (int i = 0; i < W; i++) begin
        dig = code % 3;          // 0 -> 0, 1 -> +1, 2 -> -1
        code = code / 3;
        rb[i] = (dig == 0) ? 2'b00 : (dig == 1) ? 2'b01 : 2'b10;
        val += (dig == 0 ? 0 : dig == 1 ? 1 : -1) * (1 << i);
      end
      @(posedge clk);
      checks++;
      if (x !== W'(val)) begin
        failures++;
        $display("FAIL rb=%b value=%0d: x=%b", rb, val, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
