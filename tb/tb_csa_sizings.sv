// Workload testbench: every block sizing considered for 32- and 64-bit
// carry select adders, checked both as hardware and against the delay model
// that the sizings were chosen with.
//
// Hardware: one carry_select_adder is instantiated per sizing (thirteen
// sizings, 3 to 13 blocks, 32 and 64 bits), and each is fed corner cases and
// random operands; {cout, s} must equal x + y + cin.
//
// Delay model (normalised to the full-adder carry delay): block i's two
// chains finish at t_in,i = M_i; the select of block 2 is the first block's
// carry, t_sel,2 = M_1; for i >= 3, t_sel,i = max(t_in,i-1, t_sel,i-1) +
// alpha + beta * (M_i + 1), since the multiplexer of block i-1 drives the
// M_i sum multiplexers and the carry multiplexer of block i. The figure of
// merit is max(t_in,Q, t_sel,Q), the last block's delay without its own
// output multiplexer. The model is evaluated for each (alpha, beta, sizing)
// case and compared with the reference delay of that case to 0.01.
//
// Sizing procedure, checked on the 32-bit, alpha = 0.33, beta = 0.26 case:
// M_1 = M_2 = round((alpha+beta) / (ln(1-beta) (2 beta - 1)) -
// (alpha+beta)/beta); then each further block takes the largest integer size
// that keeps its chains no later than its select, M_i = floor((M_12 +
// beta * sum(M_3..M_i-1) + (i-2)(alpha+beta)) / (1-beta)), while the total
// stays within N; then the remaining bits are added one at a time to the
// block whose enlargement raises the modelled delay least. The result must
// be the default sizing of the adder, 2, 2, 3, 5, 8, 12.
module tb_csa_sizings;
  import csa_pkg::*;

  localparam int unsigned NCFG = 13;

  localparam int unsigned CFG_Q [NCFG] = '{6, 8, 11, 10, 5, 3, 9, 10, 9, 13, 9, 8, 6};
  function automatic block_sizes_t cfg_sizes(int unsigned g);
    case (g)
      0: return '{ 2, 2, 3, 5, 8, 12, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      1: return '{ 1, 1, 2, 3, 4, 5, 7, 9, 0, 0, 0, 0, 0, 0, 0, 0};
      2: return '{ 1, 1, 1, 1, 2, 3, 3, 4, 5, 5, 6, 0, 0, 0, 0, 0};
      3: return '{ 1, 1, 1, 2, 2, 3, 4, 5, 6, 7, 0, 0, 0, 0, 0, 0};
      4: return '{ 3, 3, 5, 8, 13, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      5: return '{ 9, 9, 14, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      6: return '{ 1, 1, 2, 4, 5, 7, 10, 14, 20, 0, 0, 0, 0, 0, 0, 0};
      7: return '{ 1, 1, 1, 2, 3, 5, 7, 10, 14, 20, 0, 0, 0, 0, 0, 0};
      8: return '{ 1, 1, 2, 3, 5, 7, 10, 15, 20, 0, 0, 0, 0, 0, 0, 0};
      9: return '{ 1, 1, 1, 2, 3, 4, 4, 5, 6, 7, 9, 10, 11, 0, 0, 0};
      10: return '{ 1, 1, 2, 4, 5, 8, 10, 14, 19, 0, 0, 0, 0, 0, 0, 0};
      11: return '{ 3, 3, 3, 6, 8, 11, 13, 17, 0, 0, 0, 0, 0, 0, 0, 0};
      12: return '{ 3, 3, 6, 10, 16, 26, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      default: return '{default: 0};
    endcase
  endfunction

  // Delay cases: (alpha, beta, index of the sizing, expected delay).
  typedef struct {
    real         alpha;
    real         beta;
    int unsigned cfg;
    real         delay;
  } delay_case_t;

  localparam int unsigned NCASE = 20;
  delay_case_t cases [NCASE];

  int checks = 0;
  int failures = 0;
  int done = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- hardware
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned Q = CFG_Q[g];
    localparam int unsigned N = block_offset(cfg_sizes(g), CFG_Q[g]);

    logic [N-1:0] x, y, s;
    logic         cin, cout;

    carry_select_adder #(.Q(Q), .SIZES(cfg_sizes(g))) u_adder (
      .x(x), .y(y), .cin(cin), .s(s), .cout(cout)
    );

    task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv, input logic cv);
      logic [N:0] expected;
      x   = xv;
      y   = yv;
      cin = cv;
      expected = {1'b0, xv} + {1'b0, yv} + {{N{1'b0}}, cv};
      #1;
      checks++;
      if ({cout, s} !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL sizing %0d: x=%h y=%h cin=%0d got %h expected %h",
                   g, xv, yv, cv, {cout, s}, expected);
      end
    endtask

    initial begin
      apply('0, '0, 1'b0);
      apply('1, '1, 1'b1);
      apply('1, '0, 1'b1);
      apply('1, N'(1), 1'b0);
      for (int n = 0; n < 2000; n++) begin
        logic [N-1:0] xr, yr;
        xr = N'({$urandom, $urandom});
        yr = N'({$urandom, $urandom});
        if (n % 4 == 3) yr = ~xr ^ (N'(1) << ($urandom % N));
        apply(xr, yr, 1'($urandom));
      end
      done++;
    end
  end

  // ------------------------------------------------------------ delay model
  function automatic real max_r(real a, real b);
    return (a > b) ? a : b;
  endfunction

  function automatic real model_delay(real alpha, real beta, int unsigned q, block_sizes_t m);
    real tsel;
    tsel = real'(m[0]);
    for (int unsigned i = 2; i < q; i++)
      tsel = max_r(real'(m[i-1]), tsel) + alpha + beta * (real'(m[i]) + 1.0);
    return (q == 1) ? real'(m[0]) : max_r(real'(m[q-1]), tsel);
  endfunction

  function automatic real abs_r(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic check_real(string what, real got, real expected, real tol);
    checks++;
    if (abs_r(got - expected) > tol) begin
      failures++;
      $display("FAIL %s: got %0.4f expected %0.4f", what, got, expected);
    end
  endtask

  // ------------------------------------------------------- sizing procedure
  function automatic real m12_opt(real alpha, real beta);
    return (alpha + beta) / ($ln(1.0 - beta) * (2.0 * beta - 1.0)) - (alpha + beta) / beta;
  endfunction

  // First step: nearly-optimum sizing, at most n bits. Returns its block count.
  function automatic int unsigned nearly_optimum(real alpha, real beta, int unsigned n,
                                                 output block_sizes_t m);
    int unsigned q, total, m12, next, sum3;
    m = '{default: 0};
    m12 = int'(m12_opt(alpha, beta));
    if (m12 < 1) m12 = 1;
    m[0] = m12;
    q = 1;
    total = m12;
    if (total + m12 > n) return q;
    m[1] = m12;
    q = 2;
    total += m12;
    sum3 = 0;
    forever begin
      next = int'($floor((real'(m12) + beta * real'(sum3) + real'(q - 1) * (alpha + beta))
                         / (1.0 - beta)));
      if (q >= MAX_BLOCKS || total + next > n) break;
      m[q] = next;
      sum3 += next;
      total += next;
      q++;
    end
    return q;
  endfunction

  // Second step: add the missing bits one at a time where they cost least.
  function automatic void complete(real alpha, real beta, int unsigned q, int unsigned n,
                                   inout block_sizes_t m);
    int unsigned total;
    total = block_offset(m, q);
    while (total < n) begin
      int unsigned best;
      real         best_delay;
      best = 0;
      best_delay = 1.0e30;
      for (int unsigned i = 0; i < q; i++) begin
        block_sizes_t trial;
        real          d;
        trial = m;
        trial[i]++;
        d = model_delay(alpha, beta, q, trial);
        if (d < best_delay - 1.0e-9) begin
          best = i;
          best_delay = d;
        end
      end
      m[best]++;
      total++;
    end
  endfunction

  initial begin
    block_sizes_t m;
    int unsigned  q;
    real          tsel;

    cases = '{
      '{0.05, 0.33, 0, 12.76}, '{0.05, 0.33, 0, 12.76},
      '{0.20, 0.21, 1, 9.93},  '{0.20, 0.21, 1, 9.93},
      '{0.21, 0.10, 2, 6.85},  '{0.21, 0.10, 2, 6.85},
      '{0.30, 0.08, 3, 7.00},  '{0.30, 0.08, 2, 6.82},
      '{0.33, 0.30, 4, 13.00}, '{0.33, 0.30, 0, 12.92},
      '{0.48, 0.40, 5, 15.48}, '{0.48, 0.40, 5, 15.48},
      '{0.20, 0.25, 6, 20.25}, '{0.20, 0.25, 7, 20.10},
      '{0.33, 0.25, 8, 20.58}, '{0.42, 0.08, 9, 11.68},
      '{0.42, 0.21, 10, 19.00}, '{0.42, 0.21, 11, 18.96},
      '{0.42, 0.35, 12, 26.51}, '{0.48, 0.21, 10, 19.21}
    };

    // Delay model against the reference delays.
    for (int unsigned k = 0; k < NCASE; k++) begin
      real d;
      d = model_delay(cases[k].alpha, cases[k].beta, CFG_Q[cases[k].cfg],
                      cfg_sizes(cases[k].cfg));
      $display("alpha=%0.2f beta=%0.2f sizing %0d: modelled delay %0.3f, reference %0.2f",
               cases[k].alpha, cases[k].beta, cases[k].cfg, d, cases[k].delay);
      check_real($sformatf("delay case %0d", k), d, cases[k].delay, 0.011);
    end

    // Sizing procedure on the 32-bit, alpha = 0.33, beta = 0.26 example.
    check_real("M_12,opt", m12_opt(0.33, 0.26), 1.81, 0.005);
    q = nearly_optimum(0.33, 0.26, 32, m);
    checks++;
    if (q != 6 || m[0] != 2 || m[1] != 2 || m[2] != 3 || m[3] != 5 || m[4] != 7 || m[5] != 11) begin
      failures++;
      $display("FAIL nearly-optimum sizing: q=%0d %p", q, m);
    end
    check_real("N*", real'(block_offset(m, q)), 30.0, 0.0);
    // Select arrival times of blocks 2..4 of the nearly-optimum adder.
    tsel = real'(m[0]);
    check_real("t_sel,2", tsel, 2.0, 0.005);
    tsel = max_r(real'(m[1]), tsel) + 0.33 + 0.26 * (real'(m[2]) + 1.0);
    check_real("t_sel,3", tsel, 3.37, 0.005);
    tsel = max_r(real'(m[2]), tsel) + 0.33 + 0.26 * (real'(m[3]) + 1.0);
    check_real("t_sel,4", tsel, 5.26, 0.005);
    complete(0.33, 0.26, q, 32, m);
    checks++;
    for (int unsigned i = 0; i < MAX_BLOCKS; i++) begin
      if (m[i] != ((i < DEFAULT_Q) ? DEFAULT_SIZES[i] : 0)) begin
        failures++;
        $display("FAIL completed sizing %p differs from the default sizing", m);
        break;
      end
    end
    $display("sizing for N=32 alpha=0.33 beta=0.26: %p", m);

    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
