// csd_ftfa_top: the two fault tolerant CSD recoders side by side.
//
// tc_*: two's complement to CSD. An (N+1)-bit input (bit N is the look-ahead
//       bit) and an initial carry give N CSD digits one cycle later.
// rb_*: redundant binary to CSD. N+1 RB digits give N CSD digits three
//       cycles later.
// Both recode through a ripple carry chain of fault tolerant full adders
// that detects and repairs stuck sum/carry faults; the per-bit flags fs/fc
// say which adder was faulty. The *_fault inputs inject stuck-at faults for
// test and are tied to zero in use. Digits are {s, d}: d=1 is +1, s=1 is -1.
// Shared clock and asynchronous active-low reset.
module csd_ftfa_top
  import csd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // two's complement to CSD
  input  logic      [N:0]      tc_x,
  input  logic                 tc_cin,
  input  fa_fault_t [N-1:0]    tc_fault,
  output sd_digit_t [N-1:0]    tc_y,
  output logic                 tc_cout,
  output logic      [N-1:0]    tc_fs,
  output logic      [N-1:0]    tc_fc,
  // redundant binary to CSD
  input  sd_digit_t [N:0]      rb_in,
  input  fa_fault_t [N-1:0]    rb_fault,
  output sd_digit_t [N-1:0]    rb_y,
  output logic                 rb_cout,
  output logic      [N-1:0]    rb_fs,
  output logic      [N-1:0]    rb_fc
);

  tc2csd #(.N(N)) u_tc2csd (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (tc_x),
    .cin   (tc_cin),
    .fault (tc_fault),
    .y     (tc_y),
    .cout  (tc_cout),
    .fs    (tc_fs),
    .fc    (tc_fc)
  );

  rb2csd #(.N(N)) u_rb2csd (
    .clk   (clk),
    .rst_n (rst_n),
    .rb    (rb_in),
    .fault (rb_fault),
    .y     (rb_y),
    .cout  (rb_cout),
    .fs    (rb_fs),
    .fc    (rb_fc)
  );

endmodule
