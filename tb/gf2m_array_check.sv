// Stimulus and checker for one systolic array (divider or inverter) of
// size M, used by the array testbenches.
//
// It streams N operations back to back (one every M clocks) into the array,
// each with its own random irreducible G, and one trailing dummy word so that
// the framing sequence runs on.  The first operations are corner cases
// (B = 1, B = x^{M-1}, A = 0, A = B, B = G - x^M).  For every output slot it
// checks c_out against the word-level reference, ctl_out against the frame,
// and for every word it checks C*B == A (1 for the inverter) with an
// independent multiplier.  Output slot k of operation n is expected exactly
// 4M-4+n*M+k clocks after the MSB of operation n entered, which makes the
// last bit of the first result arrive in cycle 5M-5 (5M-4 cycles).
module gf2m_array_check
  import gf2m_ref_pkg::*;
#(
  parameter int M   = 8,
  parameter int N   = 100,
  parameter bit INV = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          checks,
  output int          failures,
  output ev_t         ev
);

  localparam int LAT = 4 * M - 4;
  localparam int unsigned MASK = (1 << M) - 1;

  logic ctl_in, b_in, g_in, c_out, ctl_out;
  logic a_in;

  if (INV) begin : g_inv
    gf2m_inv_array #(.M(M)) dut (
      .clk(clk), .rst_n(rst_n), .ctl_in(ctl_in), .b_in(b_in), .g_in(g_in),
      .c_out(c_out), .ctl_out(ctl_out));
  end else begin : g_div
    gf2m_div_array #(.M(M)) dut (
      .clk(clk), .rst_n(rst_n), .ctl_in(ctl_in), .a_in(a_in), .b_in(b_in),
      .g_in(g_in), .c_out(c_out), .ctl_out(ctl_out));
  end

  int unsigned wa[N+1], wb[N+1], wg[N+1], wc[N+1];
  int unsigned got;
  int last_bit_cycle;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    ev = '{default: 0};
    last_bit_cycle = -1;
    got = 0;
    for (int n = 0; n <= N; n++) begin
      wg[n] = rand_irred(M);
      wa[n] = INV ? 1 : ($urandom & MASK);
      do wb[n] = $urandom & MASK; while (wb[n] == 0);
      case (n)
        0: wb[n] = 1;
        1: wb[n] = 1 << (M - 1);
        2: if (!INV) wa[n] = 0;
        3: if (!INV) wa[n] = wb[n];
        4: wb[n] = wg[n] & MASK;
        default: ;
      endcase
      wc[n] = ref_div(wa[n], wb[n], wg[n], M, INV, ev);
    end
  end

  // Drive on the rising edge + 1, sample what the registers show then.
  initial begin
    int n, k, on, ok;
    int nres;
    ctl_in = 1'b1;
    b_in = 1'b0;
    g_in = 1'b0;
    a_in = 1'b0;
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
      b_in   = wb[n][M-1-k];
      g_in   = wg[n][M-1-k];
      a_in   = wa[n][M-1-k];   // not connected for the inverter
      @(posedge clk);
      #1;
      if (c + 1 >= LAT && (c + 1 - LAT) < N * M) begin
        on = (c + 1 - LAT) / M;
        ok = (c + 1 - LAT) % M;
        checks++;
        if (c_out !== wc[on][M-1-ok] || ctl_out !== (ok != 0)) begin
          failures++;
          if (failures < 8)
            $display("M=%0d INV=%0d op %0d slot %0d: c=%b exp %b ctl=%b",
                     M, INV, on, ok, c_out, wc[on][M-1-ok], ctl_out);
        end
        got = {got[30:0], c_out};
        if (ok == M - 1) begin
          checks++;
          if (gf_mul(got & MASK, wb[on], wg[on], M) != wa[on]) begin
            failures++;
            $display("M=%0d INV=%0d op %0d: C*B != A (A=%h B=%h G=%h C=%h)",
                     M, INV, on, wa[on], wb[on], wg[on], got & MASK);
          end
          if (on == 0) last_bit_cycle = c + 1;
          nres++;
        end
      end
    end
    // Latency: the whole first result within 5M-4 cycles (cycles 0..5M-5).
    checks++;
    if (nres != N) begin
      failures++;
      $display("M=%0d INV=%0d: %0d results seen, expected %0d", M, INV, nres, N);
    end
    checks++;
    if (last_bit_cycle != 5 * M - 5) begin
      failures++;
      $display("M=%0d INV=%0d latency: last bit in cycle %0d, expected %0d",
               M, INV, last_bit_cycle, 5 * M - 5);
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
