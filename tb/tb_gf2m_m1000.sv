// Large-field testbench: the divider and the inverter at m = 1000, the size
// the published comparison uses to argue for O(m) area in cryptography.  G is the
// irreducible pentanomial x^1000 + x^5 + x^4 + x^3 + 1 (Ben-Or test).  Two
// operations per array (the first with B = 1) are streamed back to back and
// checked bit by bit, as C*B == A and for the 5m-4 = 4996 cycle latency by
// gf2m_wide_check.
module tb_gf2m_m1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic dd, di;
  int   cd, ci, fd, fi, sd, si, ud, ui;

  gf2m_wide_check #(.M(1000), .K3(5), .K2(4), .K1(3), .N(2), .INV(1'b0)) i_div (
    .clk(clk), .rst_n(rst_n), .done(dd), .checks(cd), .failures(fd),
    .n_swap(sd), .n_uv(ud));
  gf2m_wide_check #(.M(1000), .K3(5), .K2(4), .K1(3), .N(2), .INV(1'b1)) i_inv (
    .clk(clk), .rst_n(rst_n), .done(di), .checks(ci), .failures(fi),
    .n_swap(si), .n_uv(ui));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", cd + ci, fd + fi + 1);
    $finish;
  end

  initial begin
    int failures;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (dd && di);
    failures = fd + fi;
    $display("div1000: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", cd, fd, sd, ud);
    $display("inv1000: checks=%0d failures=%0d swaps=%0d uv_updates=%0d", ci, fi, si, ui);
    if (sd == 0 || ud == 0 || si == 0 || ui == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", cd + ci, failures);
    $finish;
  end

endmodule
