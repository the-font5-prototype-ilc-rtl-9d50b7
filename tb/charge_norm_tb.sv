// charge_norm_tb: drives random sum/difference pairs, one per cycle, and
// checks the position two cycles later against an integer model of the
// reciprocal-table arithmetic, and against the exact ratio diff/sum within
// the table's resolution (the sum is binned in steps of 8, so the relative
// error is at most 4/sum) for sums well above the noise floor. Includes
// zero and negative sums (position must be zero) and saturation.
module charge_norm_tb;
  import font5_pkg::*;

  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  adc_t sum = '0, diff = '0;
  pos_t pos;
  int checks = 0, failures = 0, approx_checked = 0, sat_seen = 0;

  always #1.4 clk = ~clk;

  charge_norm dut (.*);

  localparam int S = ADC_W - 1 - RECIP_AW;  // sum bits below the table address
  localparam int SH = RECIP_FRAC + S - (POS_W - 1);

  function automatic int model(input int s, input int d);
    longint r, p, hi, lo;
    int a;
    a = (s <= 0) ? 0 : (s >> S);
    r = (a == 0) ? 0 : $rtoi((2.0 ** (RECIP_FRAC + 1)) / (2.0 * a + 1.0) + 0.5);
    p = (longint'(d) * r);
    p = p >>> SH;
    hi = (1 << (POS_W - 1)) - 1;
    lo = -(1 << (POS_W - 1));
    if (p > hi) p = hi;
    if (p < lo) p = lo;
    return int'(p);
  endfunction

  int q_exp[$];
  int q_s[$], q_d[$];
  bit q_v[$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, d, e, es, ed;
    bit ev;
    real ratio, tol;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000 + 1; n++) begin
      if (n < 3000) begin
        case (n % 10)
          0: s = 0;
          1: s = -($urandom % 4000);
          2: s = 100 + ($urandom % 50);        // low charge: saturates
          default: s = 1000 + ($urandom % 7000);
        endcase
        d = int'($urandom % (2 * 8000)) - 8000;
        if (n % 10 > 2) d = (d * s) / 8192;     // |diff| < sum, as from a BPM
        valid_in = (n % 3) != 1;
      end else valid_in = 0;
      sum = adc_t'(s); diff = adc_t'(d);
      q_exp.push_back(model(s, d)); q_s.push_back(s); q_d.push_back(d); q_v.push_back(valid_in);
      @(negedge clk);
      if (q_exp.size() == 2) begin
        e = q_exp.pop_front(); es = q_s.pop_front(); ed = q_d.pop_front(); ev = q_v.pop_front();
        checks++;
        if (valid_out !== ev) begin failures++; $display("FAIL valid n=%0d", n); end
        checks++;
        if (pos !== POS_W'(e)) begin
          failures++;
          $display("FAIL n=%0d sum=%0d diff=%0d pos=%0d exp=%0d", n, es, ed, pos, e);
        end
        if (es >= 1000) begin
          ratio = real'(ed) / real'(es) * 8192.0;
          checks++; approx_checked++;
          tol = (ratio < 0 ? -ratio : ratio) * 4.5 / real'(es) + 2.0;
          if ((real'(pos) - ratio) > tol || (ratio - real'(pos)) > tol) begin
            failures++;
            $display("FAIL ratio sum=%0d diff=%0d pos=%0d ideal=%f", es, ed, pos, ratio);
          end
        end
        if (pos == pos_t'((1 << (POS_W - 1)) - 1) || pos == pos_t'(-(1 << (POS_W - 1)))) sat_seen++;
      end
    end
    checks++;
    if (sat_seen == 0 || approx_checked < 1000) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
