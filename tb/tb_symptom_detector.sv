// tb_symptom_detector: random occupancy, flags and thresholds against the
// three-case rule (speed up above W_k or when almost full; slow down below
// W_(k-1) or when empty, except in configuration 0; stay otherwise), plus
// directed corner cases at the threshold values themselves.
module tb_symptom_detector;
  import dtq_pkg::*;
  localparam int unsigned CW = 9;
  cfg_t cfg;
  logic snap_valid, af, empty, sym_valid;
  logic [CW-1:0] n_wait, w_hi, w_lo;
  symptom_e symptom;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_stay = 0;

  symptom_detector #(.CW(CW)) dut (.cfg, .snap_valid, .n_wait, .almost_full(af), .empty,
                                   .w_hi, .w_lo, .sym_valid, .symptom);

  function automatic symptom_e ref_sym(int k, int n, int lo, int hi, bit a, bit e);
    if (n > hi || a) return SYM_SPEED_UP;
    if (k > 0 && (n < lo || e)) return SYM_SLOW_DOWN;
    return SYM_STAY;
  endfunction

  task automatic apply(int k, int n, int lo, int hi, bit a, bit e);
    symptom_e exp_s;
    cfg = cfg_t'(k); n_wait = CW'(n); w_lo = CW'(lo); w_hi = CW'(hi); af = a; empty = e;
    snap_valid = $urandom_range(1);
    #1;
    exp_s = ref_sym(k, n, lo, hi, a, e);
    checks++;
    if (symptom !== exp_s || sym_valid !== snap_valid) begin
      failures++;
      $display("FAIL: k=%0d n=%0d lo=%0d hi=%0d af=%0b e=%0b -> %0d, expected %0d",
               k, n, lo, hi, a, e, symptom, exp_s);
    end
    case (exp_s)
      SYM_SPEED_UP:  n_up++;
      SYM_SLOW_DOWN: n_down++;
      default:       n_stay++;
    endcase
  endtask

  initial begin
    // at and around the thresholds of the default table
    int w [6] = '{12, 13, 15, 17, 20, 25};
    for (int k = 0; k < 6; k++)
      for (int n = 0; n < 40; n++) begin
        automatic int lo = (k == 0) ? 0 : w[k-1];
        apply(k, n, lo, w[k], n >= 224, n == 0);
      end
    for (int i = 0; i < 3000; i++) begin
      automatic int k = $urandom_range(7);
      automatic int lo = $urandom_range(100);
      automatic int hi = lo + $urandom_range(100);
      automatic int n  = $urandom_range(255);
      apply(k, n, lo, hi, $urandom_range(7) == 0, n == 0);
    end
    if (n_up == 0 || n_down == 0 || n_stay == 0) begin
      failures++;
      $display("FAIL: a symptom never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
