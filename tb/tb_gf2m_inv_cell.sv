// Self-checking testbench of one inverter basic cell (gf2m_inv_cell).
//
// Random word-level iteration states (R, S, T, U, V, G, count, state) are
// serialised MSB first into the cell, back to back, and every output slot of
// every line is compared with one iteration of the word-level reference
// (gf2m_ref_pkg::ref_iter, with T = x*T
// not reduced by G) two clocks later.
module tb_gf2m_inv_cell;
  import gf2m_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int M   = 8;
  localparam int N   = 400;    // words
  localparam int LAT = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  inv_link_t li, lo;

  gf2m_inv_cell dut (.clk(clk), .rst_n(rst_n), .li(li), .lo(lo));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  row_t        win [N+1];
  row_t        wout[N+1];
  int unsigned wg  [N+1];   // G: source of the random initial S only
  ev_t ev;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit slotbit(int unsigned w, int k);
    return w[M-1-k];
  endfunction

  function automatic bit fbit(int count, int k);
    return count == k + 1;
  endfunction

  initial begin
    ev = '{default: 0};
    for (int n = 0; n <= N; n++) begin
      row_t x;
      wg[n]  = rand_irred(M);
      x.r = $urandom & 32'hff;
      x.s = $urandom & 32'hff;
      x.t = $urandom & 32'hff;
      x.u = $urandom & 32'hff;
      x.v = $urandom & 32'hff;
      x.count = $urandom_range(0, M);
      x.state = (x.count == 0) ? 1'b0 : (x.count == M) ? 1'b1 : 1'($urandom);
      if (n % 7 == 0) x.r[M-1] = 1'b1;   // make Ctrl2 frequent
      win[n]  = x;
      wout[n] = ref_iter(x, wg[n], M, 1'b1, ev);
    end
    li = '0;
    li.ctl = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < (N + 1) * M; c++) begin
      int n, k;
      n = c / M;
      k = c % M;
      li.ctl = (k != 0);
      li.r   = slotbit(win[n].r, k);
      li.s   = slotbit(win[n].s, k);
      li.t   = slotbit(win[n].t, k);
      li.u   = slotbit(win[n].u, k);
      li.v   = slotbit(win[n].v, k);
      li.f   = fbit(win[n].count, k);
      li.st  = win[n].state;
      li.cz  = (win[n].count == 0);
      @(posedge clk);
      #1;
      // outputs now show cycle c+1
      if (c + 1 >= LAT && (c + 1 - LAT) < N * M) begin
        int on, ok;
        row_t y;
        inv_link_t e;
        on = (c + 1 - LAT) / M;
        ok = (c + 1 - LAT) % M;
        y  = wout[on];
        e.ctl = (ok != 0);
        e.r   = slotbit(y.r, ok);
        e.s   = slotbit(y.s, ok);
        e.t   = slotbit(y.t, ok);
        e.u   = slotbit(y.u, ok);
        e.v   = slotbit(y.v, ok);
        e.f   = fbit(y.count, ok);
        e.st  = y.state;
        e.cz  = (y.count == 0);
        checks++;
        if (lo !== e) begin
          failures++;
          if (failures < 10)
            $display("word %0d slot %0d: got %b exp %b", on, ok, lo, e);
        end
      end
    end
    $display("events: ctrl1=%0d ctrl2=%0d ctrl3=%0d red=%0d",
             ev.n_ctrl1, ev.n_ctrl2, ev.n_ctrl3, ev.n_red);
    if (ev.n_ctrl1 == 0 || ev.n_ctrl3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
