// sym_tdl: transposed-form delay line with structural adders for a
// linear-phase (symmetric) FIR filter.
//
// In transposed form every tap multiplies the current sample, so the
// multiplier block only has to produce one product per distinct coefficient.
// Tap k of an N_TAPS filter uses product min(k, N_TAPS-1-k): each product
// feeds two structural adders, which is how the symmetric half of the
// coefficient set costs delays and adders only.
//   z[N-1] <= prod(N-1)
//   z[k]   <= prod(k) + z[k+1]        for k = N-2 .. 1
//   y      <= prod(0) + z[1]
// All registers advance only when 'en' is high (one sample per enabled cycle);
// with 'en' low the filter state is held. Registers clear on rst_n low.
//
// Interface: prod[u] = h_u * x[n] for the NU = ceil(N_TAPS/2) distinct
// coefficients; y = sum_k h_k x[n-k], registered; y_valid marks the cycle after
// an enabled one. Latency: y for sample n is visible one clock after it is
// taken. The register width OUT_W and the synchronous enable are this
// design's choices.
module sym_tdl #(
  parameter int N_TAPS = 6,
  parameter int PW     = 24,                          // product width
  parameter int OUT_W  = PW + $clog2(N_TAPS),         // accumulator width
  parameter int NU     = (N_TAPS + 1) / 2             // distinct products
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [PW-1:0]    prod [NU],
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  // product used by tap k
  function automatic int tap_src(int k);
    return (k < NU) ? k : N_TAPS - 1 - k;
  endfunction

  logic signed [OUT_W-1:0] z [N_TAPS];   // z[0] unused

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) z[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        for (int k = 1; k < N_TAPS - 1; k++)
          z[k] <= OUT_W'(prod[tap_src(k)]) + z[k+1];
        if (N_TAPS > 1) begin
          z[N_TAPS-1] <= OUT_W'(prod[tap_src(N_TAPS-1)]);
          y           <= OUT_W'(prod[0]) + z[1];
        end else begin
          y           <= OUT_W'(prod[0]);
        end
      end
    end
  end

endmodule
