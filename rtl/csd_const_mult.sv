// csd_const_mult: multiplication of a signal by a fixed integer constant using only
// hardwired shifts and adders/subtracters.
//
// The constant C is recoded at elaboration time into canonic signed digits
// (digits -1/0/+1, no two adjacent nonzero). Starting from the most significant
// nonzero digit, every further nonzero digit adds or subtracts x shifted by the
// digit's position, so the unit holds (nonzero digits - 1) adders in a chain. A
// constant that is a signed power of two costs no adder; C = 0 gives a constant zero.
// This is the per-constant "adder bank" the generator uses for every alpha*beta
// scaling (and for per-column scaling in the vertical style) when two-term sharing
// is switched off.
//
// Interface: x is IW bits signed; y = C * x taken modulo 2^OW (two's complement).
// Choosing OW wide enough for the final result keeps it exact, because every
// intermediate value is computed modulo the same 2^OW.
// Timing: purely combinational, no clock.
// The CSD choice follows the coefficient representation of the transform; the
// chain order (most significant digit first) is this design's own choice.
module csd_const_mult #(
  parameter int IW = 8,   // input width
  parameter int OW = 16,  // output width
  parameter int C  = 91   // the constant; default is the DCT-8 DC coefficient at W = 8
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] y
);
  import mlt_pkg::*;

  localparam int ND = CSD_DIGITS;

  // Highest nonzero CSD digit position, -1 for C == 0.
  function automatic int top_digit();
    int t;
    t = -1;
    for (int i = 0; i < ND; i++)
      if (csd_digit(longint'(C), i) != 0) t = i;
    return t;
  endfunction

  localparam int TOP = top_digit();

  logic signed [OW-1:0] xe;
  assign xe = OW'(x);   // sign-extend (or wrap) to the working width

  // acc[i] holds the partial product of digits TOP..i.
  logic signed [OW-1:0] acc [ND+1];

  if (TOP < 0) begin : g_zero
    assign y = '0;
  end else begin : g_chain
    for (genvar i = ND - 1; i >= 0; i--) begin : g_dig
      localparam int D = csd_digit(longint'(C), i);
      if (i > TOP) begin : g_above
        assign acc[i] = '0;
      end else if (i == TOP) begin : g_first
        if (D > 0) begin : g_pos
          assign acc[i] = xe <<< i;
        end else begin : g_neg
          assign acc[i] = -(xe <<< i);
        end
      end else if (D > 0) begin : g_add
        assign acc[i] = acc[i+1] + (xe <<< i);
      end else if (D < 0) begin : g_sub
        assign acc[i] = acc[i+1] - (xe <<< i);
      end else begin : g_pass
        assign acc[i] = acc[i+1];
      end
    end
    assign acc[ND] = '0;
    assign y = acc[0];
  end

endmodule
