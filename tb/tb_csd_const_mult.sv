// tb_csd_const_mult: exhaustive self-check of the CSD shift-and-add constant
// multiplier. Eight instances with different constants (positive, negative, zero,
// powers of two, long runs of ones, the DCT-8 odd parts) see every 8-bit input;
// each output is compared with C * x reduced to the output width.
module tb_csd_const_mult;
  localparam int IW = 8;
  localparam int OW = 24;
  localparam int NC = 8;
  localparam int CS [NC] = '{91, -91, 0, 1, 64, 7, 12345, 255};

  int checks = 0;
  int failures = 0;

  logic signed [IW-1:0] x;
  logic signed [OW-1:0] y [NC];

  for (genvar k = 0; k < NC; k++) begin : g_dut
    csd_const_mult #(.IW(IW), .OW(OW), .C(CS[k])) u_dut (.x(x), .y(y[k]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expect_v;
    for (int v = -128; v < 128; v++) begin
      x = IW'(v);
      #1;
      for (int k = 0; k < NC; k++) begin
        expect_v = longint'(CS[k]) * longint'(v);
        checks++;
        if (y[k] !== OW'(expect_v)) begin
          failures++;
          if (failures < 10)
            $display("FAIL C=%0d x=%0d got %0d expected %0d", CS[k], v, y[k], expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
