// Stimulus and checker for one systolic array at a large field size M, used
// by the field-size testbench.  Unlike gf2m_array_check it keeps all
// polynomials in M+1-bit vectors, so any M works.
//
// G(x) = x^M + x^K3 + x^K2 + x^K1 + 1 (a trinomial when K2 = K3 = 0).  N
// random operations are streamed back to back (operation 0 uses B = 1),
// followed by one dummy word.  Each result is compared bit by bit with a
// word-level run of the algorithm and checked as C*B == A (A = 1 for the
// inverter) with a shift-and-add multiplier; the first result must be
// complete in cycle 5M-5.
module gf2m_wide_check #(
  parameter int M   = 16,
  parameter int K3  = 5,
  parameter int K2  = 3,
  parameter int K1  = 1,
  parameter int N   = 3,
  parameter bit INV = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_swap,
  output int   n_uv
);

  typedef logic [M:0]   poly_t;   // up to x^M
  typedef logic [M-1:0] elem_t;

  localparam int LAT = 4 * M - 4;

  logic ctl_in, a_in, b_in, g_in, c_out, ctl_out;

  if (INV) begin : g_inv
    gf2m_inv_array #(.M(M)) dut (
      .clk(clk), .rst_n(rst_n), .ctl_in(ctl_in), .b_in(b_in), .g_in(g_in),
      .c_out(c_out), .ctl_out(ctl_out));
  end else begin : g_div
    gf2m_div_array #(.M(M)) dut (
      .clk(clk), .rst_n(rst_n), .ctl_in(ctl_in), .a_in(a_in), .b_in(b_in),
      .g_in(g_in), .c_out(c_out), .ctl_out(ctl_out));
  end

  function automatic poly_t gpoly();
    poly_t g = '0;
    g[M] = 1'b1;
    g[0] = 1'b1;
    g[K1] = 1'b1;
    if (K2 > 0) g[K2] = 1'b1;
    if (K3 > 0) g[K3] = 1'b1;
    return g;
  endfunction

  function automatic elem_t rand_elem();
    elem_t e;
    for (int i = 0; i < M; i++) e[i] = 1'($urandom);
    return e;
  endfunction

  function automatic elem_t mul(elem_t a, elem_t b, poly_t g);
    poly_t x = poly_t'(a);
    elem_t p = '0;
    for (int i = 0; i < M; i++) begin
      if (b[i]) p ^= x[M-1:0];
      x = x << 1;
      if (x[M]) x ^= g;
    end
    return p;
  endfunction

  function automatic elem_t euclid(elem_t a, elem_t b, poly_t g,
                                   ref int sw, ref int uv);
    poly_t r = poly_t'(b), s = g, t = '0, u = poly_t'(a), v = '0, tmp;
    int count = 0;
    bit state = 1'b0;
    for (int i = 0; i < 2 * M - 2; i++) begin
      r = r << 1;
      t = t << 1;
      if (t[M] && !INV) t ^= g;
      t[M] = 1'b0;
      if (!state) begin
        count++;
        if (r[M]) begin
          tmp = r; r ^= s; s = tmp; t = u; state = 1'b1; sw++;
        end
      end else begin
        count--;
        if (r[M]) begin
          r ^= s; t ^= u;
        end
        if (count == 0) begin
          tmp = t ^ v; v = u; u = tmp; state = 1'b0; uv++;
        end
      end
    end
    return u[M-1:0];
  endfunction

  elem_t wa[N+1], wb[N+1], wc[N+1];
  elem_t got;
  poly_t g;
  int last_bit_cycle;

  initial begin
    int n, k, on, ok;
    int nres;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_swap = 0;
    n_uv = 0;
    g = gpoly();
    for (n = 0; n <= N; n++) begin
      wa[n] = INV ? elem_t'(1) : rand_elem();
      do wb[n] = rand_elem(); while (wb[n] == '0);
      if (n == 0) wb[n] = elem_t'(1);
      wc[n] = euclid(wa[n], wb[n], g, n_swap, n_uv);
    end
    ctl_in = 1'b1;
    a_in = 1'b0;
    b_in = 1'b0;
    g_in = 1'b0;
    got = '0;
    last_bit_cycle = -1;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    nres = 0;
    // Run until the last result is out; after the operations the last
    // (dummy) word is repeated so that the framing keeps running.
    for (int c = 0; c < N * M + LAT; c++) begin
      n = (c / M > N) ? N : c / M;
      k = c % M;
      ctl_in = (k != 0);
      a_in   = wa[n][M-1-k];
      b_in   = wb[n][M-1-k];
      g_in   = g[M-1-k];
      @(posedge clk);
      #1;
      if (c + 1 >= LAT && (c + 1 - LAT) < N * M) begin
        on = (c + 1 - LAT) / M;
        ok = (c + 1 - LAT) % M;
        checks++;
        if (c_out !== wc[on][M-1-ok] || ctl_out !== (ok != 0)) begin
          failures++;
          if (failures < 5)
            $display("M=%0d INV=%0d op %0d slot %0d wrong", M, INV, on, ok);
        end
        got = {got[M-2:0], c_out};
        if (ok == M - 1) begin
          checks++;
          if (mul(got, wb[on], g) != (INV ? elem_t'(1) : wa[on])) begin
            failures++;
            $display("M=%0d INV=%0d op %0d: C*B != A", M, INV, on);
          end
          if (on == 0) last_bit_cycle = c + 1;
          nres++;
        end
      end
    end
    checks++;
    if (nres != N) begin
      failures++;
      $display("M=%0d INV=%0d: %0d results seen, expected %0d", M, INV, nres, N);
    end
    checks++;
    if (last_bit_cycle != 5 * M - 5) begin
      failures++;
      $display("M=%0d INV=%0d latency wrong: %0d", M, INV, last_bit_cycle);
    end
    done = 1'b1;
    // Keep the framing running (idle words) while other checkers finish.
    for (int c = N * M + LAT; ; c++) begin
      ctl_in = (c % M != 0);
      @(posedge clk);
      #1;
    end
  end

endmodule
