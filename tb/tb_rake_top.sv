// tb_rake_top: end-to-end test of the DS-UWB RAKE receiver subsystem at its
// default size (8-bit samples, 15 taps, 3 pilot bits, 9 fingers).
//
// For each of several packets the bench draws a random chip-spaced channel
// of 15 taps with a decaying amplitude envelope, spreads 3 pilot bits and
// NBITS random data bits with a 15-chip m-sequence, passes the chips through
// the channel and feeds the resulting samples to the design one per clock,
// after a random number of idle clocks with en low. It then checks:
//   * every channel estimate equals 16 times the true tap weight (the
//     estimator's closed-form result for an m-sequence pilot);
//   * the selected finger list: the 4 earliest taps, plus the 5 strongest
//     of the middle 8 (ties to the earlier path);
//   * every combined symbol, bit for bit, against a model of the despreading
//     and combining, and the clock on which it appears;
//   * the sign of every combined symbol against the transmitted bit.
// It counts each mechanism (estimator dump, the four finger categories,
// idle clocks before a packet, a new packet after reset) and fails if one
// never happened.
module tb_rake_top;
  localparam int NC     = 15;
  localparam int L      = 15;
  localparam int NE     = 3;
  localparam int NRR    = 9;
  localparam int NBITS  = 24;
  localparam int NPKT   = 6;
  localparam int NCHIP  = NC * (NE + NBITS);
  localparam int RR_START = NC * NE + L - 1;

  logic              clk = 1'b0;
  logic              rst;
  logic              en;
  logic [NC-1:0]     pn_code;
  logic signed [7:0] signal_in;
  logic signed [19:0] est_symbol;
  logic              est_valid;
  logic signed [7:0] coeff [L];
  logic        [3:0] idx [NRR];

  rake_top dut (
    .clk(clk), .rst(rst), .en(en), .pn_code(pn_code), .signal_in(signal_in),
    .est_symbol(est_symbol), .est_valid(est_valid), .coeff(coeff), .idx(idx)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dump = 0, n_pab = 0, n_pac = 0, n_sac = 0, n_sab = 0;
  int n_idle = 0, n_packets = 0, n_symbols = 0, n_bit_ok = 0;

  int h [L];           // true tap weights, index = arrival delay
  int chip [NCHIP];    // transmitted chips, +1 / -1
  int bits [NBITS];
  int r [NCHIP + 40];  // received samples

  function automatic int wrap8(int v);
    return int'(signed'(8'(v)));
  endfunction

  function automatic int chip_val(int m);
    if (m < 0 || m >= NCHIP) return 0;
    return chip[m];
  endfunction

  // Despread value of tap delay d over data bit b, as an 8-bit finger sees it.
  function automatic int despread(int d, int b);
    int acc = 0;
    for (int n = RR_START + NC * b; n < RR_START + NC * (b + 1); n++)
      acc += (pn_code[(n - (L - 1)) % NC] ? 1 : -1) * r[n - d];
    return wrap8(acc);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] lfsr;
    int exp_coeff [L];
    int sel [NRR];
    bit selected [L];
    bit first_valid;

    // 15-chip m-sequence from x^4 + x^3 + 1.
    lfsr = 4'b0001;
    for (int i = 0; i < NC; i++) begin
      pn_code[i] = lfsr[0];
      lfsr = {lfsr[0] ^ lfsr[1], lfsr[3:1]};
    end
    checks++;
    if ($countones(pn_code) != 8) begin
      failures++;
      $display("PN code %b is not balanced", pn_code);
    end

    for (int pkt = 0; pkt < NPKT; pkt++) begin
      int idle;
      int vcount;
      int t;
      // Channel: first arrival strong, tail weak, random signs.
      for (int p = 0; p < L; p++) begin
        int amp;
        amp = (p < 3) ? 6 : (p < 7) ? 4 : (p < 11) ? 2 : 1;
        h[p] = int'($urandom_range(0, 2 * amp)) - amp;
      end
      if (h[0] == 0) h[0] = 5;
      for (int b = 0; b < NBITS; b++) bits[b] = $urandom_range(0, 1);
      for (int m = 0; m < NCHIP; m++) begin
        int c;
        c = pn_code[m % NC] ? 1 : -1;
        chip[m] = (m < NC * NE) ? c : ((bits[m / NC - NE] != 0) ? c : -c);
      end
      for (int m = 0; m < NCHIP + 40; m++) begin
        r[m] = 0;
        for (int p = 0; p < L; p++) r[m] += h[p] * chip_val(m - p);
      end

      // Expected estimates and selection.
      for (int k = 0; k < L; k++) exp_coeff[k] = 16 * h[L - 1 - k];
      for (int k = 0; k < L; k++) selected[k] = 0;
      for (int k = L - 4; k < L; k++) selected[k] = 1;
      for (int s = 0; s < 5; s++) begin
        int best;
        best = -1;
        for (int k = 3; k < L - 4; k++) begin
          if (!selected[k]) begin
            if (best < 0) best = k;
            else if ((exp_coeff[k] < 0 ? -exp_coeff[k] : exp_coeff[k]) >=
                     (exp_coeff[best] < 0 ? -exp_coeff[best] : exp_coeff[best]))
              best = k;
          end
        end
        selected[best] = 1;
      end

      // Reset, load the code, then idle with en low.
      rst = 1'b1; en = 1'b0; signal_in = '0;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      idle = $urandom_range(0, 4);
      repeat (idle) @(negedge clk);
      n_idle += idle;
      n_packets++;

      vcount = 0;
      first_valid = 1;
      for (t = 0; t < NCHIP + 40; t++) begin
        en = 1'b1;
        signal_in = 8'(r[t]);
        if (est_valid) begin
          int e, b;
          b = vcount;
          n_symbols++;
          checks++;
          if (t != RR_START + NC * (b + 1) + 3) begin
            failures++;
            $display("pkt %0d bit %0d: est_valid at chip %0d, expected %0d",
                     pkt, b, t, RR_START + NC * (b + 1) + 3);
          end
          if (first_valid) begin
            first_valid = 0;
            n_dump++;
            for (int k = 0; k < L; k++) begin
              checks++;
              if (int'(coeff[k]) != exp_coeff[k]) begin
                failures++;
                $display("pkt %0d coeff[%0d]=%0d expected %0d", pkt, k, coeff[k], exp_coeff[k]);
              end
            end
            for (int k = 0; k < L; k++) begin
              bit found;
              found = 0;
              for (int i = 0; i < NRR; i++) if (int'(idx[i]) == k) found = 1;
              checks++;
              if (found != selected[k]) begin
                failures++;
                $display("pkt %0d tap %0d selected=%0d expected %0d", pkt, k, found, selected[k]);
              end
              if (k < 3) n_pab += !found;
              else if (k >= L - 4) n_pac += found;
              else if (found) n_sac++;
              else n_sab++;
            end
          end
          if (b < NBITS) begin
            e = 0;
            for (int k = 0; k < L; k++)
              if (selected[k]) e += despread(k, b) * exp_coeff[k];
            checks++;
            if (int'(est_symbol) != e) begin
              failures++;
              $display("pkt %0d bit %0d: est_symbol=%0d expected %0d", pkt, b, est_symbol, e);
            end
            checks++;
            if ((est_symbol > 0) == (bits[b] == 1)) n_bit_ok++;
            else begin
              failures++;
              $display("pkt %0d bit %0d: decision wrong (est %0d, bit %0d)", pkt, b, est_symbol, bits[b]);
            end
          end
          vcount++;
        end
        @(negedge clk);
      end
      checks++;
      if (vcount < NBITS) begin
        failures++;
        $display("pkt %0d: only %0d symbols", pkt, vcount);
      end
    end

    $display("packets=%0d dumps=%0d symbols=%0d correct_bits=%0d idle=%0d pab=%0d pac=%0d sac=%0d sab=%0d",
             n_packets, n_dump, n_symbols, n_bit_ok, n_idle, n_pab, n_pac, n_sac, n_sab);
    checks++; if (n_dump == 0)   begin failures++; $display("no estimator dump"); end
    checks++; if (n_pab == 0)    begin failures++; $display("no partially aborted tap"); end
    checks++; if (n_pac == 0)    begin failures++; $display("no partially accepted tap"); end
    checks++; if (n_sac == 0)    begin failures++; $display("no selectively accepted tap"); end
    checks++; if (n_sab == 0)    begin failures++; $display("no selectively aborted tap"); end
    checks++; if (n_idle == 0)   begin failures++; $display("no idle clocks before a packet"); end
    checks++; if (n_packets < 2) begin failures++; $display("no second packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
