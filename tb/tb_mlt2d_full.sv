// tb_mlt2d_full: the transform exactly as delivered (no parameter overridden): the
// 8-point DCT with W = 8 coefficients on 8-bit inputs. Streams 1000 input vectors,
// one per clock with occasional idle clocks, starting with the extreme vectors that
// give the largest outputs, and compares every output with K x computed here from
// the cosine formula, one clock after the input. Also checks the adder count of the
// generated network (68 adders; the direct CSD realization needs 200).
module tb_mlt2d_full;
  localparam int M = 8, N = 8, W = 8, XW = 8;
  localparam int YW = XW + W + $clog2(N) + 1;

  int checks = 0;
  int failures = 0;
  int results = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [XW-1:0] x [N];
  logic out_valid;
  logic signed [YW-1:0] y [M];

  longint exp_y [M];
  logic exp_valid;

  always #5 clk = ~clk;

  mlt2d_transform u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  function automatic longint dct_ref(input int m, input int n);
    real c;
    c = (m == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N);
    return longint'($floor(c * $cos(real'((2 * n + 1) * m) * 3.141592653589793 / real'(2 * N))
                           * (2.0 ** W) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: one-clock latency.
  always @(posedge clk) begin
    if (!rst_n) begin
      exp_valid <= 1'b0;
    end else begin
      exp_valid <= in_valid;
      if (in_valid)
        for (int m = 0; m < M; m++) begin
          longint s;
          s = 0;
          for (int n = 0; n < N; n++) s += dct_ref(m, n) * longint'(x[n]);
          exp_y[m] <= s;
        end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(out_valid == exp_valid, "out_valid is not in_valid delayed by one clock");
      if (exp_valid) begin
        results++;
        for (int m = 0; m < M; m++)
          check(y[m] == YW'(exp_y[m]), $sformatf("y[%0d]=%0d expected %0d", m, y[m], exp_y[m]));
      end
    end
  end

  initial begin
    for (int n = 0; n < N; n++) x[n] = '0;
    exp_valid = 1'b0;
    check(u_dut.ADDERS_DIRECT == 200 && u_dut.NUM_ADDERS == 68,
          $sformatf("adders direct %0d built %0d, expected 200 and 68", u_dut.ADDERS_DIRECT, u_dut.NUM_ADDERS));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      #1;
      in_valid = (k < 8) || ($urandom % 8 != 0);
      for (int n = 0; n < N; n++) begin
        case (k % 8)
          0: x[n] = (n % 2 == 0) ? 8'sh7f : 8'sh80;
          1: x[n] = 8'sh80;
          2: x[n] = 8'sh7f;
          3: x[n] = (n < 4) ? 8'sh7f : 8'sh80;
          default: x[n] = XW'($urandom);
        endcase
        if (k >= 8 && k % 8 < 4) x[n] = XW'($urandom);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(results > 800, $sformatf("only %0d results", results));
    $display("results=%0d adders=%0d (direct %0d)", results, u_dut.NUM_ADDERS, u_dut.ADDERS_DIRECT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
