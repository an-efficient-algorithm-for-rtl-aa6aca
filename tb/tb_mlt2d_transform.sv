// tb_mlt2d_transform: end-to-end self-check of the multiplierless transform.
//
// Instances:
//   u_dut  - all parameters at their defaults: 8-point DCT, W = 8, direction chosen
//            automatically;
//   u_h    - same matrix, horizontal style forced;
//   u_v    - same matrix, vertical style forced;
//   u_ns   - same matrix, horizontal, two-term extraction between basis rows off;
//   u_usr  - a 3x4 user matrix with negative, zero, power-of-two and repeated-odd-part
//            entries, an all-zero row and rows that are shifted/negated copies.
// Random input vectors (plus all-extreme ones) are applied with in_valid randomly
// low; every registered output is compared with K x computed here, the output must
// appear exactly one clock after its input and hold while in_valid is low. The DCT
// coefficients are recomputed here from the cosine formula.
// Adder counts are checked: the direct realization of the W = 8 DCT needs 200 adders,
// the generated network 68 with 6 shared two-terms between basis rows and 6 inside
// the scaling constants (84 without them; the reference algorithm reaches 86), and
// the automatic choice picks the cheaper direction.
// Mechanisms counted (each must occur): horizontal datapath, vertical datapath,
// shared two-terms between basis rows and inside the scaling constants, automatic direction choice, idle (in_valid low) cycles, a reset
// during operation.
module tb_mlt2d_transform;
  import mlt_pkg::*;

  localparam int M = 8, N = 8, W = 8, XW = 8;
  localparam int YW = XW + W + $clog2(N) + 1;
  localparam int UM = 3, UN = 4;
  localparam int UYW = XW + 8 + $clog2(UN) + 1;
  // user matrix, row-major: row 1 = -2 * row 0 in the alpha = 3 part, row 2 all zero
  localparam int UK [UM*UN] = '{ 3, -12,   0,  5,
                                -6,  24, 128, -5,
                                 0,   0,   0,  0};

  function automatic logic [UM*UN-1:0][31:0] pack_uk();
    logic [UM*UN-1:0][31:0] v;
    for (int i = 0; i < UM * UN; i++) v[i] = UK[i];
    return v;
  endfunction

  int checks = 0;
  int failures = 0;
  int n_cycles = 0;
  int n_idle = 0;
  int n_reset = 0;
  int n_h = 0;
  int n_v = 0;
  int n_auto = 0;
  int n_shared = 0;
  int n_shared_scale = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [XW-1:0] x [N];
  logic signed [XW-1:0] xu [UN];
  logic ov, ov_h, ov_v, ov_u, ov_ns;
  logic signed [YW-1:0] y [M], y_h [M], y_v [M], y_ns [M];
  logic signed [UYW-1:0] y_u [UM];

  always #5 clk = ~clk;

  mlt2d_transform u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(ov), .y(y));
  mlt2d_transform #(.DIR(DIR_HORIZONTAL)) u_h (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(ov_h), .y(y_h));
  mlt2d_transform #(.DIR(DIR_VERTICAL)) u_v (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(ov_v), .y(y_v));
  mlt2d_transform #(.DIR(DIR_HORIZONTAL), .SHARE(1'b0)) u_ns (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(ov_ns), .y(y_ns));
  mlt2d_transform #(.M(UM), .N(UN), .W(8), .XW(XW), .SRC(COEF_USER), .KUSER(pack_uk())) u_usr (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xu), .out_valid(ov_u), .y(y_u));

  function automatic longint dct_ref(input int m, input int n);
    real c;
    c = (m == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N);
    return longint'($floor(c * $cos(real'((2 * n + 1) * m) * 3.141592653589793 / real'(2 * N))
                           * (2.0 ** W) + 0.5));
  endfunction

  // Expected outputs, captured when an input is accepted.
  longint exp_y [M];
  longint exp_u [UM];
  logic   exp_valid = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive and model.
  task automatic apply(input bit valid, input int mode);
    @(negedge clk);
    in_valid = valid;
    for (int n = 0; n < N; n++) begin
      case (mode)
        0: x[n] = XW'($urandom);
        1: x[n] = (n % 2 == 0) ? 8'sh7f : 8'sh80;
        2: x[n] = 8'sh80;
        default: x[n] = (n % 3 == 0) ? 8'sh80 : 8'sh7f;
      endcase
    end
    for (int n = 0; n < UN; n++) xu[n] = x[n+2];
  endtask

  // Compare on every rising edge, then update the model.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      n_cycles++;
      check(ov == exp_valid && ov_h == exp_valid && ov_v == exp_valid && ov_u == exp_valid && ov_ns == exp_valid,
            "out_valid is not in_valid delayed by one clock");
      if (exp_valid || n_cycles > 1) begin
        for (int m = 0; m < M; m++) begin
          check(y[m]   == YW'(exp_y[m]), $sformatf("auto y[%0d]=%0d exp %0d", m, y[m], exp_y[m]));
          check(y_h[m] == YW'(exp_y[m]), $sformatf("horizontal y[%0d]=%0d exp %0d", m, y_h[m], exp_y[m]));
          check(y_v[m] == YW'(exp_y[m]), $sformatf("vertical y[%0d]=%0d exp %0d", m, y_v[m], exp_y[m]));
          check(y_ns[m] == YW'(exp_y[m]), $sformatf("unshared y[%0d]=%0d exp %0d", m, y_ns[m], exp_y[m]));
        end
        for (int m = 0; m < UM; m++)
          check(y_u[m] == UYW'(exp_u[m]), $sformatf("user y[%0d]=%0d exp %0d", m, y_u[m], exp_u[m]));
        if (exp_valid) begin
          n_h++;
          n_v++;
          if (u_dut.NSHARED > 0) n_shared++;
          if (u_dut.NSHARED_SH > 0) n_shared_scale++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      exp_valid <= 1'b0;
      for (int m = 0; m < M; m++) exp_y[m] <= 0;
      for (int m = 0; m < UM; m++) exp_u[m] <= 0;
    end else begin
      exp_valid <= in_valid;
      if (!in_valid) n_idle++;
      if (in_valid) begin
        for (int m = 0; m < M; m++) begin
          longint s;
          s = 0;
          for (int n = 0; n < N; n++) s += dct_ref(m, n) * longint'(x[n]);
          exp_y[m] <= s;
        end
        for (int m = 0; m < UM; m++) begin
          longint s;
          s = 0;
          for (int n = 0; n < UN; n++) s += longint'(UK[m*UN+n]) * longint'(xu[n]);
          exp_u[m] <= s;
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < N; n++) x[n] = '0;
    for (int n = 0; n < UN; n++) xu[n] = '0;

    // Static properties of the generated networks.
    check(u_dut.ADDERS_DIRECT == 200, $sformatf("direct adders %0d, expected 200", u_dut.ADDERS_DIRECT));
    check(u_dut.ADDERS_H == 68, $sformatf("horizontal adders %0d, expected 68", u_dut.ADDERS_H));
    check(u_dut.NSHARED == 6, $sformatf("shared two-terms %0d, expected 6", u_dut.NSHARED));
    check(u_dut.NSHARED_SH == 6, $sformatf("shared scaling two-terms %0d, expected 6", u_dut.NSHARED_SH));
    check(u_v.NSHARED_SV > 0, "vertical scaling shares no two-term");
    check(u_ns.ADDERS_H == 84 && u_ns.NSHARED == 0,
          $sformatf("unshared horizontal adders %0d, expected 84", u_ns.ADDERS_H));
    check(u_dut.ADDERS_V == 144, $sformatf("vertical adders %0d, expected 144", u_dut.ADDERS_V));
    check(u_dut.NUM_ADDERS <= 86, "more adders than the reference algorithm's 86");
    check(u_dut.USE_H == 1'b1 && u_h.USE_H == 1'b1 && u_v.USE_H == 1'b0, "direction selection");
    check(u_dut.NP == 7 && u_dut.NB == 8, $sformatf("NP=%0d NB=%0d, expected 7 and 8", u_dut.NP, u_dut.NB));
    if (u_dut.NUM_ADDERS == ((u_dut.ADDERS_H <= u_dut.ADDERS_V) ? u_dut.ADDERS_H : u_dut.ADDERS_V))
      n_auto++;
    // user matrix: odd parts 3, 5 and 1 -> three sub-matrices
    check(u_usr.NP == 3, $sformatf("user NP=%0d, expected 3", u_usr.NP));

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int k = 0; k < 600; k++) begin
      if (k == 300) begin
        @(negedge clk) rst_n = 1'b0;
        @(negedge clk);
        check(ov == 1'b0 && ov_u == 1'b0, "out_valid not cleared by reset");
        n_reset++;
        rst_n = 1'b1;
      end
      apply(k < 4 || ($urandom % 10) < 7, (k < 4) ? k : 0);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);

    check(n_h > 0, "horizontal datapath never produced a result");
    check(n_v > 0, "vertical datapath never produced a result");
    check(n_auto > 0, "automatic direction choice not exercised");
    check(n_shared > 0, "no result computed through shared two-terms");
    check(n_shared_scale > 0, "no result computed through shared scaling two-terms");
    check(n_idle > 0, "no idle cycle");
    check(n_reset > 0, "no reset during operation");
    $display("mechanisms: horizontal=%0d vertical=%0d shared=%0d shared_scaling=%0d auto=%0d idle=%0d reset=%0d",
             n_h, n_v, n_shared, n_shared_scale, n_auto, n_idle, n_reset);
    $display("adders: direct=%0d horizontal=%0d (shared two-terms %0d + %0d) vertical=%0d built=%0d",
             u_dut.ADDERS_DIRECT, u_dut.ADDERS_H, u_dut.NSHARED, u_dut.NSHARED_SH, u_dut.ADDERS_V, u_dut.NUM_ADDERS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
