// Field-size testbench: both arrays at the field sizes of the
// transistor-count comparison up to m = 100 (m = 8, 12, 16, 32, 50, 80,
// 100), each with a fixed low-weight irreducible polynomial
// G = x^m + x^K3 + x^K2 + x^K1 + 1 (a trinomial where K2 = K3 = 0), found by
// the Ben-Or irreducibility test.  A few operations per size are streamed
// back to back and checked by gf2m_wide_check (bit by bit, C*B == A, and the
// 5m-4 cycle latency).  Every size must see at least one R/S swap and one
// U/V update.
module tb_gf2m_field_sizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  logic d_div8;
  int c_div8, f_div8, s_div8, u_div8;
  gf2m_wide_check #(.M(8), .K3(4), .K2(3), .K1(1), .N(4), .INV(1'b0)) i_div8 (
    .clk(clk), .rst_n(rst_n), .done(d_div8), .checks(c_div8), .failures(f_div8),
    .n_swap(s_div8), .n_uv(u_div8));
  logic d_div12;
  int c_div12, f_div12, s_div12, u_div12;
  gf2m_wide_check #(.M(12), .K3(0), .K2(0), .K1(3), .N(4), .INV(1'b0)) i_div12 (
    .clk(clk), .rst_n(rst_n), .done(d_div12), .checks(c_div12), .failures(f_div12),
    .n_swap(s_div12), .n_uv(u_div12));
  logic d_div16;
  int c_div16, f_div16, s_div16, u_div16;
  gf2m_wide_check #(.M(16), .K3(5), .K2(3), .K1(1), .N(4), .INV(1'b0)) i_div16 (
    .clk(clk), .rst_n(rst_n), .done(d_div16), .checks(c_div16), .failures(f_div16),
    .n_swap(s_div16), .n_uv(u_div16));
  logic d_div32;
  int c_div32, f_div32, s_div32, u_div32;
  gf2m_wide_check #(.M(32), .K3(7), .K2(3), .K1(2), .N(4), .INV(1'b0)) i_div32 (
    .clk(clk), .rst_n(rst_n), .done(d_div32), .checks(c_div32), .failures(f_div32),
    .n_swap(s_div32), .n_uv(u_div32));
  logic d_div50;
  int c_div50, f_div50, s_div50, u_div50;
  gf2m_wide_check #(.M(50), .K3(4), .K2(3), .K1(2), .N(4), .INV(1'b0)) i_div50 (
    .clk(clk), .rst_n(rst_n), .done(d_div50), .checks(c_div50), .failures(f_div50),
    .n_swap(s_div50), .n_uv(u_div50));
  logic d_div80;
  int c_div80, f_div80, s_div80, u_div80;
  gf2m_wide_check #(.M(80), .K3(9), .K2(4), .K1(2), .N(4), .INV(1'b0)) i_div80 (
    .clk(clk), .rst_n(rst_n), .done(d_div80), .checks(c_div80), .failures(f_div80),
    .n_swap(s_div80), .n_uv(u_div80));
  logic d_div100;
  int c_div100, f_div100, s_div100, u_div100;
  gf2m_wide_check #(.M(100), .K3(0), .K2(0), .K1(15), .N(4), .INV(1'b0)) i_div100 (
    .clk(clk), .rst_n(rst_n), .done(d_div100), .checks(c_div100), .failures(f_div100),
    .n_swap(s_div100), .n_uv(u_div100));
  logic d_inv8;
  int c_inv8, f_inv8, s_inv8, u_inv8;
  gf2m_wide_check #(.M(8), .K3(4), .K2(3), .K1(1), .N(4), .INV(1'b1)) i_inv8 (
    .clk(clk), .rst_n(rst_n), .done(d_inv8), .checks(c_inv8), .failures(f_inv8),
    .n_swap(s_inv8), .n_uv(u_inv8));
  logic d_inv12;
  int c_inv12, f_inv12, s_inv12, u_inv12;
  gf2m_wide_check #(.M(12), .K3(0), .K2(0), .K1(3), .N(4), .INV(1'b1)) i_inv12 (
    .clk(clk), .rst_n(rst_n), .done(d_inv12), .checks(c_inv12), .failures(f_inv12),
    .n_swap(s_inv12), .n_uv(u_inv12));
  logic d_inv16;
  int c_inv16, f_inv16, s_inv16, u_inv16;
  gf2m_wide_check #(.M(16), .K3(5), .K2(3), .K1(1), .N(4), .INV(1'b1)) i_inv16 (
    .clk(clk), .rst_n(rst_n), .done(d_inv16), .checks(c_inv16), .failures(f_inv16),
    .n_swap(s_inv16), .n_uv(u_inv16));
  logic d_inv32;
  int c_inv32, f_inv32, s_inv32, u_inv32;
  gf2m_wide_check #(.M(32), .K3(7), .K2(3), .K1(2), .N(4), .INV(1'b1)) i_inv32 (
    .clk(clk), .rst_n(rst_n), .done(d_inv32), .checks(c_inv32), .failures(f_inv32),
    .n_swap(s_inv32), .n_uv(u_inv32));
  logic d_inv50;
  int c_inv50, f_inv50, s_inv50, u_inv50;
  gf2m_wide_check #(.M(50), .K3(4), .K2(3), .K1(2), .N(4), .INV(1'b1)) i_inv50 (
    .clk(clk), .rst_n(rst_n), .done(d_inv50), .checks(c_inv50), .failures(f_inv50),
    .n_swap(s_inv50), .n_uv(u_inv50));
  logic d_inv80;
  int c_inv80, f_inv80, s_inv80, u_inv80;
  gf2m_wide_check #(.M(80), .K3(9), .K2(4), .K1(2), .N(4), .INV(1'b1)) i_inv80 (
    .clk(clk), .rst_n(rst_n), .done(d_inv80), .checks(c_inv80), .failures(f_inv80),
    .n_swap(s_inv80), .n_uv(u_inv80));
  logic d_inv100;
  int c_inv100, f_inv100, s_inv100, u_inv100;
  gf2m_wide_check #(.M(100), .K3(0), .K2(0), .K1(15), .N(4), .INV(1'b1)) i_inv100 (
    .clk(clk), .rst_n(rst_n), .done(d_inv100), .checks(c_inv100), .failures(f_inv100),
    .n_swap(s_inv100), .n_uv(u_inv100));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_div8 + c_div12 + c_div16 + c_div32 + c_div50 + c_div80 + c_div100 + c_inv8 + c_inv12 + c_inv16 + c_inv32 + c_inv50 + c_inv80 + c_inv100, f_div8 + f_div12 + f_div16 + f_div32 + f_div50 + f_div80 + f_div100 + f_inv8 + f_inv12 + f_inv16 + f_inv32 + f_inv50 + f_inv80 + f_inv100 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d_div8 && d_div12 && d_div16 && d_div32 && d_div50 && d_div80 && d_div100 && d_inv8 && d_inv12 && d_inv16 && d_inv32 && d_inv50 && d_inv80 && d_inv100);
    checks   = c_div8 + c_div12 + c_div16 + c_div32 + c_div50 + c_div80 + c_div100 + c_inv8 + c_inv12 + c_inv16 + c_inv32 + c_inv50 + c_inv80 + c_inv100;
    failures = f_div8 + f_div12 + f_div16 + f_div32 + f_div50 + f_div80 + f_div100 + f_inv8 + f_inv12 + f_inv16 + f_inv32 + f_inv50 + f_inv80 + f_inv100;
    $display("div8: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div8, f_div8, s_div8, u_div8);
    if (s_div8 == 0 || u_div8 == 0) failures++;
    $display("div12: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div12, f_div12, s_div12, u_div12);
    if (s_div12 == 0 || u_div12 == 0) failures++;
    $display("div16: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div16, f_div16, s_div16, u_div16);
    if (s_div16 == 0 || u_div16 == 0) failures++;
    $display("div32: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div32, f_div32, s_div32, u_div32);
    if (s_div32 == 0 || u_div32 == 0) failures++;
    $display("div50: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div50, f_div50, s_div50, u_div50);
    if (s_div50 == 0 || u_div50 == 0) failures++;
    $display("div80: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div80, f_div80, s_div80, u_div80);
    if (s_div80 == 0 || u_div80 == 0) failures++;
    $display("div100: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_div100, f_div100, s_div100, u_div100);
    if (s_div100 == 0 || u_div100 == 0) failures++;
    $display("inv8: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv8, f_inv8, s_inv8, u_inv8);
    if (s_inv8 == 0 || u_inv8 == 0) failures++;
    $display("inv12: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv12, f_inv12, s_inv12, u_inv12);
    if (s_inv12 == 0 || u_inv12 == 0) failures++;
    $display("inv16: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv16, f_inv16, s_inv16, u_inv16);
    if (s_inv16 == 0 || u_inv16 == 0) failures++;
    $display("inv32: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv32, f_inv32, s_inv32, u_inv32);
    if (s_inv32 == 0 || u_inv32 == 0) failures++;
    $display("inv50: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv50, f_inv50, s_inv50, u_inv50);
    if (s_inv50 == 0 || u_inv50 == 0) failures++;
    $display("inv80: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv80, f_inv80, s_inv80, u_inv80);
    if (s_inv80 == 0 || u_inv80 == 0) failures++;
    $display("inv100: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", c_inv100, f_inv100, s_inv100, u_inv100);
    if (s_inv100 == 0 || u_inv100 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
