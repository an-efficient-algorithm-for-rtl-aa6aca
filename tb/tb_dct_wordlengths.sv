// tb_dct_wordlengths: the 8-point DCT realized at coefficient wordlengths 12, 16 and
// 24 bits (W = 8 is covered by tb_mlt2d_transform). For each wordlength it checks
//   * the adder count of the direct CSD realization (264, 344, 536 adders),
//   * that the generated network is no larger than the reference algorithm's result
//     (110, 154, 211 adders) and equals the count expected for this generator
//     (78, 100, 140 with two-terms shared between basis rows and inside the
//     scaling constants),
//   * the outputs against K x for random and extreme inputs, one clock after input.
// The horizontal style (the one the automatic choice picks for the DCT at every W) is
// forced, which skips the vertical two-term search and keeps elaboration short.
module tb_dct_wordlengths;
  localparam int N = 8;
  localparam int XW = 8;
  localparam int NW = 3;
  localparam int WS [NW]        = '{12, 16, 24};
  localparam int DIRECT [NW]    = '{264, 344, 536};
  localparam int REFERENCE [NW] = '{110, 154, 211};
  localparam int EXPECTED [NW]  = '{78, 100, 140};
  localparam int YWMAX = XW + 24 + $clog2(N) + 1;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [XW-1:0] x [N];
  logic ov [NW];
  logic signed [YWMAX-1:0] yv [NW][N];
  int adders_direct [NW];
  int adders_built [NW];

  always #5 clk = ~clk;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int YW = XW + WS[k] + $clog2(N) + 1;
    logic signed [YW-1:0] y [N];
    mlt2d_transform #(.W(WS[k]), .DIR(mlt_pkg::DIR_HORIZONTAL)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(ov[k]), .y(y));
    for (genvar m = 0; m < N; m++) begin : g_m
      assign yv[k][m] = YWMAX'(y[m]);
    end
    initial begin
      adders_direct[k] = u_dut.ADDERS_DIRECT;
      adders_built[k]  = u_dut.NUM_ADDERS;
    end
  end

  function automatic longint dct_ref(input int m, input int n, input int w);
    real c;
    c = (m == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N);
    return longint'($floor(c * $cos(real'((2 * n + 1) * m) * 3.141592653589793 / real'(2 * N))
                           * (2.0 ** w) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    for (int n = 0; n < N; n++) x[n] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NW; k++) begin
      check(adders_direct[k] == DIRECT[k],
            $sformatf("W=%0d direct adders %0d, expected %0d", WS[k], adders_direct[k], DIRECT[k]));
      check(adders_built[k] <= REFERENCE[k] && adders_built[k] == EXPECTED[k],
            $sformatf("W=%0d built adders %0d, expected %0d", WS[k], adders_built[k], EXPECTED[k]));
      $display("DCT_%0d: direct %0d adders, generated %0d adders", WS[k], adders_direct[k], adders_built[k]);
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int n = 0; n < N; n++)
        x[n] = (t == 0) ? ((n % 2 == 0) ? 8'sh7f : 8'sh80) : (t == 1) ? 8'sh80 : XW'($urandom);
      @(posedge clk);
      #1;
      for (int k = 0; k < NW; k++) begin
        check(ov[k] == 1'b1, "out_valid missing one clock after input");
        for (int m = 0; m < N; m++) begin
          s = 0;
          for (int n = 0; n < N; n++) s += dct_ref(m, n, WS[k]) * longint'(x[n]);
          check(yv[k][m] == YWMAX'(s),
                $sformatf("W=%0d y[%0d]=%0d expected %0d", WS[k], m, yv[k][m], s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
