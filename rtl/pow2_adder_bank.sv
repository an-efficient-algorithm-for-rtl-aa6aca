// pow2_adder_bank: adder bank whose inputs are weighted by hardwired signed powers of
// two, y = sum over t of w[t] * in[t] with w[t] in {0, +2^SH[t], -2^SH[t]}.
//
// Weights are parameters: NZ[t] says the input takes part, NEG[t] that it is
// subtracted, SH[t] the left shift applied to it. The bank is a chain of adders and
// subtracters: it starts from the first positive participating input (so no
// negation is needed unless every weight is negative) and adds or subtracts the
// others in index order, i.e. (participating inputs - 1) adders. No participating
// input gives a constant zero.
// The same unit realizes each basis row vector k_r^T x (inputs are the transform
// inputs, weights are the row entries), each scaling by a constant alpha_p once its
// shared two-terms are extracted (inputs are the signal and the shared two-terms,
// weights are the remaining CSD digits) and each rowwise sum that forms one output
// y_m (inputs are scaled basis outputs, weights are the beta shifts and signs).
//
// Interface: T inputs of IW bits signed; y is OW bits, computed modulo 2^OW, which
// is exact whenever the true sum fits in OW bits.
// Timing: purely combinational.
// A linear chain (rather than a balanced tree) is this design's own choice; the
// adder count is the same either way.
module pow2_adder_bank #(
  parameter int T  = 4,
  parameter int IW = 8,
  parameter int OW = 12,
  parameter logic [T-1:0] NZ  = '1,
  parameter logic [T-1:0] NEG = '0,
  parameter logic [T-1:0][mlt_pkg::SHW-1:0] SH = '0
) (
  input  logic signed [IW-1:0] in [T],
  output logic signed [OW-1:0] y
);

  // First input the chain starts from: first positive one, else first participating.
  function automatic int first_term();
    for (int t = 0; t < T; t++)
      if (NZ[t] && !NEG[t]) return t;
    for (int t = 0; t < T; t++)
      if (NZ[t]) return t;
    return -1;
  endfunction

  localparam int FIRST = first_term();

  // Each input widened to OW bits and shifted into place.
  logic signed [OW-1:0] term [T];
  for (genvar t = 0; t < T; t++) begin : g_term
    assign term[t] = OW'(in[t]) <<< SH[t];
  end

  // acc[t+1] = running sum after considering inputs 0..t (the first one excluded
  // from its index position and placed at the start instead).
  logic signed [OW-1:0] acc [T+1];

  if (FIRST < 0) begin : g_zero
    assign y = '0;
  end else begin : g_chain
    if (NEG[FIRST]) begin : g_start_neg
      assign acc[0] = -term[FIRST];
    end else begin : g_start_pos
      assign acc[0] = term[FIRST];
    end
    for (genvar t = 0; t < T; t++) begin : g_step
      if (!NZ[t] || t == FIRST) begin : g_skip
        assign acc[t+1] = acc[t];
      end else if (NEG[t]) begin : g_sub
        assign acc[t+1] = acc[t] - term[t];
      end else begin : g_add
        assign acc[t+1] = acc[t] + term[t];
      end
    end
    assign y = acc[T];
  end

endmodule
