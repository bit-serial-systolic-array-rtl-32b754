// Self-checking testbench of the systolic inverter array (gf2m_inv_array).
//
// Runs the array at its default size (M = 8), at the size of the worked
// example (M = 3) and at M = 13, each with a stream of back-to-back
// operations checked slot by slot, result by result and for latency by
// gf2m_array_check.
module tb_gf2m_inv_array;
  import gf2m_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d8, d3, d13;
  int   c8, c3, c13, f8, f3, f13;
  ev_t  e8, e3, e13;
  int   checks, failures;

  gf2m_array_check #(.M(8),  .N(300), .INV(1'b1)) u_m8  (.clk(clk), .rst_n(rst_n), .done(d8),  .checks(c8),  .failures(f8),  .ev(e8));
  gf2m_array_check #(.M(3),  .N(100), .INV(1'b1)) u_m3  (.clk(clk), .rst_n(rst_n), .done(d3),  .checks(c3),  .failures(f3),  .ev(e3));
  gf2m_array_check #(.M(13), .N(200), .INV(1'b1)) u_m13 (.clk(clk), .rst_n(rst_n), .done(d13), .checks(c13), .failures(f13), .ev(e13));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c3 + c13, f8 + f3 + f13 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d8 && d3 && d13);
    checks   = c8 + c3 + c13;
    failures = f8 + f3 + f13;
    $display("M=8 events: ctrl1=%0d ctrl2=%0d ctrl3=%0d red=%0d count=m %0d",
             e8.n_ctrl1, e8.n_ctrl2, e8.n_ctrl3, e8.n_red, e8.n_maxcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
