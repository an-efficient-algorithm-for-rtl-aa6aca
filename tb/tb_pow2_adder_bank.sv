// tb_pow2_adder_bank: self-check of the signed power-of-two weighted adder bank.
// Three instances: mixed signs and shifts with one unused input, all weights
// negative (the chain must start with a negation), and no participating input.
// Random and extreme input vectors are applied; outputs are compared with the sum
// of w[t] * in[t] computed in the testbench.
module tb_pow2_adder_bank;
  localparam int T  = 5;
  localparam int IW = 8;
  localparam int OW = 14;
  localparam int SHW = mlt_pkg::SHW;

  // Instance A: weights +1, -4, 0, +8, -2 (input 2 unused).
  localparam logic [T-1:0] NZ_A  = 5'b11011;
  localparam logic [T-1:0] NEG_A = 5'b10010;
  localparam logic [T-1:0][SHW-1:0] SH_A = {8'd1, 8'd3, 8'd5, 8'd2, 8'd0};
  // Instance B: weights -1, -2, -1, -16, -1.
  localparam logic [T-1:0] NZ_B  = 5'b11111;
  localparam logic [T-1:0] NEG_B = 5'b11111;
  localparam logic [T-1:0][SHW-1:0] SH_B = {8'd0, 8'd4, 8'd0, 8'd1, 8'd0};

  int checks = 0;
  int failures = 0;

  logic signed [IW-1:0] in [T];
  logic signed [OW-1:0] ya, yb, yc;

  pow2_adder_bank #(.T(T), .IW(IW), .OW(OW), .NZ(NZ_A), .NEG(NEG_A), .SH(SH_A)) u_a (.in(in), .y(ya));
  pow2_adder_bank #(.T(T), .IW(IW), .OW(OW), .NZ(NZ_B), .NEG(NEG_B), .SH(SH_B)) u_b (.in(in), .y(yb));
  pow2_adder_bank #(.T(T), .IW(IW), .OW(OW), .NZ('0), .NEG('0), .SH('0)) u_c (.in(in), .y(yc));

  function automatic longint ref_sum(input logic [T-1:0] nz, input logic [T-1:0] neg,
                                     input logic [T-1:0][SHW-1:0] sh);
    longint s;
    longint w;
    s = 0;
    for (int t = 0; t < T; t++)
      if (nz[t]) begin
        w = longint'(1) << sh[t];
        if (neg[t]) w = -w;
        s += w * longint'(in[t]);
      end
    return s;
  endfunction

  task automatic check(input logic signed [OW-1:0] got, input longint exp_v, input string name);
    checks++;
    if (got !== OW'(exp_v)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", name, got, exp_v);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int t = 0; t < T; t++) begin
        if (k == 0)      in[t] = 8'sh7f;
        else if (k == 1) in[t] = 8'sh80;
        else             in[t] = IW'($urandom);
      end
      #1;
      check(ya, ref_sum(NZ_A, NEG_A, SH_A), "A");
      check(yb, ref_sum(NZ_B, NEG_B, SH_B), "B");
      check(yc, 0, "C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
