// tb_fir_pe: self-checking testbench for one fir_pe processing element.
//
// Drives random samples, partial sums and coefficients (the coefficient is
// changed every few clocks) on the falling edge, and after every rising edge
// compares x_out and y_out with values computed here from the recorded input
// history: x_out must equal the sample of the last edge, and y_out the partial
// sum of two edges back plus the product of the coefficient of two edges back
// and the sample of three edges back, all modulo 2**16. It also checks that
// reset clears both outputs, and checks the register counts directly: an
// isolated sample shows up on x_out one clock after capture and its product
// on y_out two clocks after that.
module tb_fir_pe;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned ACC_W  = 16;
  localparam int          NCYC   = 2000;

  logic              clk = 1'b0;
  logic              rst;
  logic [COEF_W-1:0] coef;
  logic [DATA_W-1:0] x_in;
  logic [ACC_W-1:0]  y_in;
  logic [DATA_W-1:0] x_out;
  logic [ACC_W-1:0]  y_out;

  int checks   = 0;
  int failures = 0;
  int edge_no  = 0;

  // Input values present at each rising edge.
  longint unsigned xh [NCYC+16];
  longint unsigned yh [NCYC+16];
  longint unsigned ch [NCYC+16];

  fir_pe #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) dut (
    .clk, .rst, .coef, .x_in, .y_in, .x_out, .y_out
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    xh[edge_no] <= longint'(x_in);
    yh[edge_no] <= longint'(y_in);
    ch[edge_no] <= longint'(coef);
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

  // Watchdog.
  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    rst  = 1'b1;
    coef = 16'hFFFF;
    x_in = 16'h1234;
    y_in = 16'h4321;
    repeat (3) @(negedge clk);
    check("x_out after reset", longint'(x_out), 0);
    check("y_out after reset", longint'(y_out), 0);
    rst = 1'b0;

    // Latency of each path: an isolated sample with zero partial sums.
    coef = 16'd3;
    y_in = '0;
    x_in = 16'd7;
    @(negedge clk);        // edge s captured the sample
    x_in = '0;
    check("x_out one clock after capture", longint'(x_out), 7);
    check("y_out not yet", longint'(y_out), 0);
    @(negedge clk);
    check("x_out cleared", longint'(x_out), 0);
    check("y_out not yet", longint'(y_out), 0);
    @(negedge clk);
    check("y_out three edges after capture", longint'(y_out), 21);
    @(negedge clk);
    check("y_out isolated", longint'(y_out), 0);

    // Random streams.
    start = edge_no;
    for (int n = 0; n < NCYC - 20; n++) begin
      x_in = DATA_W'($urandom);
      y_in = ACC_W'($urandom);
      if (n % 7 == 0) coef = COEF_W'($urandom);
      @(negedge clk);
      if (edge_no >= start + 3) begin
        check("x_out", longint'(x_out), xh[edge_no-1]);
        check("y_out", longint'(y_out),
              (yh[edge_no-2] + ch[edge_no-2] * xh[edge_no-3]) % 65536);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
