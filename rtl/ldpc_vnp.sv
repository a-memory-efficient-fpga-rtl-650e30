// Variable node processor (VNP).
//
// One VNP serves one block column of the parity check matrix and handles one
// variable node per clock cycle. It receives the variable's channel value
// and the C check-to-variable messages of its C edges (one per block row),
// converts them from sign-magnitude to two's complement, forms the
// a-posteriori sum APP = I + sum(R), and returns for every edge the
// extrinsic message L_i = APP - R_i, converted back to sign-magnitude and
// passed through the quantized scale rule (ldpc_scale). The hard decision is
// the sign of APP (1 when APP < 0, so a zero sum decides 0).
// The convert/add/convert structure follows the design; the sum width and
// the zero-decides-0 rule are this implementation's choices.
//
// r_zero forces every R input to zero; it is used in the first iteration,
// when the message memories have not been written yet.
// Purely combinational.
module ldpc_vnp #(
  parameter int unsigned C = 3
) (
  input  ldpc_pkg::msg_t         intr,      // channel value I_v
  input  ldpc_pkg::msg_t [C-1:0] r_in,      // check-to-variable messages
  input  logic                   r_zero,    // treat all r_in as zero
  output ldpc_pkg::msg_t [C-1:0] l_out,     // scaled variable-to-check messages
  output logic                   hd         // hard decision of the variable
);
  import ldpc_pkg::*;

  localparam int unsigned SUM_W = MSG_W + $clog2(C + 1) + 1;

  typedef logic signed [SUM_W-1:0] sum_t;

  function automatic sum_t to_tc(msg_t m);
    sum_t v;
    v = sum_t'({1'b0, m.mag});
    return m.sign ? -v : v;
  endfunction

  sum_t             r_tc [C];
  sum_t             app;
  sum_t             ext  [C];
  logic [SUM_W-2:0] ext_mag [C];

  always_comb begin
    app = to_tc(intr);
    for (int i = 0; i < C; i++) begin
      r_tc[i] = r_zero ? sum_t'(0) : to_tc(r_in[i]);
      app     = app + r_tc[i];
    end
    for (int i = 0; i < C; i++) begin
      ext[i]     = app - r_tc[i];
      ext_mag[i] = ext[i][SUM_W-1] ? (SUM_W-1)'(-ext[i]) : ext[i][SUM_W-2:0];
    end
    hd = app[SUM_W-1];
  end

  for (genvar i = 0; i < C; i++) begin : g_scale
    logic [MAG_W-1:0] smag;
    ldpc_scale #(.IN_W(SUM_W - 1)) u_scale (
      .mag_in (ext_mag[i]),
      .mag_out(smag)
    );
    // A magnitude that scales to zero carries no sign.
    assign l_out[i] = '{sign: ext[i][SUM_W-1] && (smag != '0), mag: smag};
  end
endmodule
