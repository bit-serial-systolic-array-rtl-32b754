// End-to-end testbench of gf2m_euclid_top at its default size (M = 8).
//
// The divider and the inverter run at the same time, each fed a continuous
// stream of operations (one every M clocks).  The inverter gets every nonzero
// B for each of four random irreducible field polynomials (4 x 255
// inversions); the divider gets the same number of random divisions, G
// changing from word to word.  Every output bit, every frame marker and every
// result (C*B == A, C*B == 1) is checked, and the first result of each array
// must be complete in cycle 5M-5, i.e. within 5M-4 cycles.
//
// The mechanisms of the algorithm are counted over all operations: the
// R/S swap (Ctrl1), the R+S step (Ctrl2), the U/V update when the count
// returns to zero (Ctrl3), the reduction of T by G in the divider, and the
// count reaching its largest value M.  A mechanism that never happened
// counts as a failure.
module tb_gf2m_euclid_top;
  import gf2m_ref_pkg::*;

  localparam int M    = 8;
  localparam int NG   = 4;
  localparam int N    = NG * 255;
  localparam int LAT  = 4 * M - 4;
  localparam int unsigned MASK = (1 << M) - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic div_ctl, div_a, div_b, div_g, div_c, div_ctl_o;
  logic inv_ctl, inv_b, inv_g, inv_c, inv_ctl_o;

  gf2m_euclid_top dut (
    .clk, .rst_n,
    .div_ctl, .div_a, .div_b, .div_g, .div_c, .div_ctl_o,
    .inv_ctl, .inv_b, .inv_g, .inv_c, .inv_ctl_o
  );

  int checks = 0, failures = 0;
  int unsigned da[N+1], db[N+1], dg[N+1], dc[N+1];
  int unsigned ib[N+1], ig[N+1], ic[N+1];
  ev_t evd, evi;
  int unsigned dgot, igot;
  int d_last, i_last;

  initial begin
    repeat (20 * N + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n, k, on, ok;
    int nres;
    evd = '{default: 0};
    evi = '{default: 0};
    for (int j = 0; j < NG; j++) begin
      int unsigned g;
      g = rand_irred(M);
      for (int b = 1; b <= 255; b++) begin
        n = j * 255 + b - 1;
        ib[n] = b;
        ig[n] = g;
        ic[n] = ref_div(1, b, g, M, 1'b1, evi);
      end
    end
    ib[N] = 1; ig[N] = ig[0];
    for (n = 0; n <= N; n++) begin
      dg[n] = rand_irred(M);
      da[n] = $urandom & MASK;
      do db[n] = $urandom & MASK; while (db[n] == 0);
      dc[n] = ref_div(da[n], db[n], dg[n], M, 1'b0, evd);
    end
    div_ctl = 1'b1; div_a = 1'b0; div_b = 1'b0; div_g = 1'b0;
    inv_ctl = 1'b1; inv_b = 1'b0; inv_g = 1'b0;
    d_last = -1; i_last = -1; dgot = 0; igot = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    nres = 0;
    // Run until the last result is out; after the operations the last
    // (dummy) word is repeated so that the framing keeps running.
    for (int c = 0; c < N * M + LAT; c++) begin
      n = (c / M > N) ? N : c / M;
      k = c % M;
      div_ctl = (k != 0);
      inv_ctl = (k != 0);
      div_a = da[n][M-1-k];
      div_b = db[n][M-1-k];
      div_g = dg[n][M-1-k];
      inv_b = ib[n][M-1-k];
      inv_g = ig[n][M-1-k];
      @(posedge clk);
      #1;
      if (c + 1 >= LAT && (c + 1 - LAT) < N * M) begin
        on = (c + 1 - LAT) / M;
        ok = (c + 1 - LAT) % M;
        check($sformatf("div op %0d slot %0d", on, ok),
              div_c == dc[on][M-1-ok] && div_ctl_o == (ok != 0));
        check($sformatf("inv op %0d slot %0d", on, ok),
              inv_c == ic[on][M-1-ok] && inv_ctl_o == (ok != 0));
        dgot = {dgot[30:0], div_c};
        igot = {igot[30:0], inv_c};
        if (ok == M - 1) begin
          check($sformatf("div op %0d: C*B == A", on),
                gf_mul(dgot & MASK, db[on], dg[on], M) == da[on]);
          check($sformatf("inv op %0d: C*B == 1", on),
                gf_mul(igot & MASK, ib[on], ig[on], M) == 1);
          nres++;
          if (on == 0) begin
            d_last = c + 1;
            i_last = c + 1;
          end
        end
      end
    end
    check("all results seen", nres == N);
    check("latency 5M-4", d_last == 5 * M - 5 && i_last == 5 * M - 5);
    $display("operations: %0d divisions, %0d inversions, latency %0d cycles",
             N, N, d_last + 1);
    $display("divider  : swap=%0d r_plus_s=%0d uv_update=%0d t_reduce=%0d count_max=%0d",
             evd.n_ctrl1, evd.n_ctrl2, evd.n_ctrl3, evd.n_red, evd.n_maxcount);
    $display("inverter : swap=%0d r_plus_s=%0d uv_update=%0d count_max=%0d",
             evi.n_ctrl1, evi.n_ctrl2, evi.n_ctrl3, evi.n_maxcount);
    check("divider swap happened",      evd.n_ctrl1 > 0);
    check("divider R+S happened",       evd.n_ctrl2 > 0);
    check("divider U/V update happened", evd.n_ctrl3 > 0);
    check("divider T reduction happened", evd.n_red > 0);
    check("divider count reached M",    evd.n_maxcount > 0);
    check("inverter swap happened",     evi.n_ctrl1 > 0);
    check("inverter R+S happened",      evi.n_ctrl2 > 0);
    check("inverter U/V update happened", evi.n_ctrl3 > 0);
    check("inverter count reached M",   evi.n_maxcount > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
