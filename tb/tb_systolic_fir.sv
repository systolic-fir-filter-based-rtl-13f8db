// tb_systolic_fir: end-to-end, self-checking testbench of the systolic FIR
// filter at its default size (four taps, 16-bit data, coefficients and sums).
//
// Four phases, all driving on the falling edge and checking after each rising
// edge:
//  1. The reference stimulus: the unsigned series 0 2 5 7 4 8 5 5 9 9 ... with
//     every coefficient 1. The partial sums y1..y3 and the output are checked
//     every clock against sums of the recorded inputs, and the successive
//     values the output takes once its window is full are compared with the
//     expected series 18 24 22 27 28 32 36.
//  2. Latency: after a reset, a single sample followed by zeros, with distinct
//     coefficients. The output must show a_0*v exactly TAPS+1 clocks after the
//     sample was captured, then a_1*v .. a_3*v one per clock, the last 2*TAPS
//     clocks after capture, and zero everywhere else. The first output whose
//     window is fully made of captured samples is thus counted 2*TAPS clocks
//     after the first sample.
//  3. Throughput: random samples and coefficients; a new, correct result is
//     checked on every clock, y(t) = sum_k a_k x(t-TAPS-1-k) mod 2**16.
//  4. Reconfiguration: the coefficients are changed while samples keep
//     streaming; checks stop for the 2*TAPS clocks in which old and new
//     coefficients mix and then resume against the new ones.
// Each mechanism (full-window output of the reference series, impulse
// latency, one result per clock, coefficient reconfiguration) is counted and
// a failure is counted for any that never happened.
module tb_systolic_fir;
  localparam int unsigned TAPS   = fir_pkg::TAPS;
  localparam int unsigned DATA_W = fir_pkg::DATA_W;
  localparam int unsigned COEF_W = fir_pkg::COEF_W;
  localparam int unsigned ACC_W  = fir_pkg::ACC_W;
  localparam int          HIST   = 8192;
  localparam longint unsigned MOD = 64'd1 << ACC_W;

  // Reference series and the output values it must produce with unit
  // coefficients (sums of four consecutive samples from the sample 2 on).
  localparam int SERIES   [16] = '{0, 2, 5, 7, 4, 8, 5, 5, 9, 9, 9, 9, 9, 9, 9, 9};
  localparam int EXPECT_Q [7]  = '{18, 24, 22, 27, 28, 32, 36};

  logic              clk = 1'b0;
  logic              rst;
  logic [COEF_W-1:0] coef   [TAPS];
  logic [DATA_W-1:0] x_in;
  logic [ACC_W-1:0]  y_out;
  logic [ACC_W-1:0]  y_part [TAPS];

  int checks   = 0;
  int failures = 0;
  int edge_no  = 0;

  // Mechanism counters.
  int n_ref_series  = 0;
  int n_latency     = 0;
  int n_per_clock   = 0;
  int n_reconfig    = 0;

  // Sample present at each rising edge (0 while in reset).
  longint unsigned xh [HIST];

  systolic_fir dut (.clk, .rst, .coef, .x_in, .y_out, .y_part);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    xh[edge_no] <= rst ? 64'd0 : longint'(x_in);
  end

  task automatic check(input string what, input longint unsigned got,
                       input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s at edge %0d: got %0d expected %0d", what, edge_no, got, exp);
    end
  endtask

  // Expected partial sum after element i (i = TAPS-1 is the output), after
  // the last edge: element j holds coefficient a_{TAPS-1-j} and contributes
  // the sample captured 2*(i+1)-j edges back.
  function automatic longint unsigned expect_part(int i);
    longint unsigned s = 0;
    for (int j = 0; j <= i; j++) begin
      int e = edge_no - 1 - 2 * (i + 1) + j;
      longint unsigned xv = (e >= 0) ? xh[e] : 64'd0;
      s = (s + longint'(coef[TAPS-1-j]) * xv) % MOD;
    end
    return s;
  endfunction

  // Expected output straight from the FIR equation y = sum_k a_k x(t-k),
  // with the array's pipeline delay of TAPS+1 edges.
  function automatic longint unsigned expect_fir();
    longint unsigned s = 0;
    for (int k = 0; k < TAPS; k++) begin
      int e = edge_no - 1 - (TAPS + 1) - k;
      longint unsigned xv = (e >= 0) ? xh[e] : 64'd0;
      s = (s + longint'(coef[k]) * xv) % MOD;
    end
    return s;
  endfunction

  task automatic check_all();
    for (int i = 0; i < TAPS; i++)
      check($sformatf("y_part[%0d]", i), longint'(y_part[i]), expect_part(i));
    check("y_out", longint'(y_out), expect_fir());
  endtask

  task automatic do_reset();
    rst  = 1'b1;
    x_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  // Watchdog.
  initial begin
    repeat (HIST - 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- phase 1: reference series, unit coefficients
    int got_q [$];
    int first_edge;
    int cap_edge;
    int impulse;
    int d;
    longint unsigned exp_v;
    logic [COEF_W-1:0] a [TAPS];

    foreach (coef[k]) coef[k] = 1;
    do_reset();
    for (int n = 0; n < 16 + 2 * TAPS; n++) begin
      x_in = (n < 16) ? DATA_W'(SERIES[n]) : DATA_W'(9);
      if (n == 1) first_edge = edge_no;   // edge that captures the sample 2
      @(negedge clk);
      check_all();
      // Output windows made only of the series from the sample 2 onward.
      if (edge_no - 1 >= first_edge + 2 * TAPS && n < 16 + TAPS + 1) begin
        if (got_q.size() == 0 || got_q[$] != int'(y_out)) got_q.push_back(int'(y_out));
      end
    end
    checks++;
    if (got_q.size() != 7) begin
      failures++;
      $display("FAIL reference series has %0d distinct output values, expected 7", got_q.size());
    end else begin
      for (int i = 0; i < 7; i++) check("reference output series", longint'(got_q[i]), longint'(EXPECT_Q[i]));
      n_ref_series++;
    end

    // ---------------- phase 2: impulse latency
    foreach (a[k]) a[k] = COEF_W'(k + 2);   // 2 3 4 5
    coef = a;
    do_reset();
    x_in = 16'd10;
    @(negedge clk);
    cap_edge = edge_no - 1;
    x_in = '0;
    impulse = 0;
    for (int n = 0; n < 3 * TAPS; n++) begin
      d = edge_no - 1 - cap_edge;   // clocks since the sample was captured
      exp_v = (d >= TAPS + 1 && d <= 2 * TAPS) ? longint'(a[d - TAPS - 1]) * 10 : 64'd0;
      check($sformatf("impulse response %0d clocks after capture", d), longint'(y_out), exp_v);
      if (d == 2 * TAPS && y_out == ACC_W'(a[TAPS-1] * 10)) impulse++;
      @(negedge clk);
    end
    if (impulse == 1) n_latency++;

    // ---------------- phase 3: random stream, one result per clock
    foreach (coef[k]) coef[k] = COEF_W'($urandom);
    for (int n = 0; n < 2000; n++) begin
      x_in = DATA_W'($urandom);
      @(negedge clk);
      if (n >= 2 * TAPS) begin
        check_all();
        n_per_clock++;
      end
    end

    // ---------------- phase 4: coefficient reconfiguration while streaming
    for (int r = 0; r < 20; r++) begin
      foreach (coef[k]) coef[k] = COEF_W'($urandom);
      n_reconfig++;
      for (int n = 0; n < 50; n++) begin
        x_in = DATA_W'($urandom);
        @(negedge clk);
        if (n >= 2 * TAPS) check_all();
      end
    end

    checks++;
    if (n_ref_series == 0 || n_latency == 0 || n_per_clock == 0 || n_reconfig == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: reference_series=%0d impulse_latency=%0d results_per_clock=%0d reconfigurations=%0d",
             n_ref_series, n_latency, n_per_clock, n_reconfig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
