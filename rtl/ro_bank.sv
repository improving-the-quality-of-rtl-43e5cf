// ro_bank: the array of NUM_RO configurable ring oscillators.
//
// All oscillators receive the same configuration c1c2c3, so a pair of
// neighbouring oscillators forms eight comparable pairs, one per
// configuration. Each oscillator has its own enable so that only the pair
// being measured runs. On the FPGA the array is placed as a compact 2-D block
// of one-CLB hard macros so that neighbours see little systematic variation;
// that is a placement constraint and here the array is a flat vector.
//
// For simulation every oscillator gets its own process seed (BASE_SEED + i)
// and a systematic delay that grows quadratically toward both ends of the
// array (frequencies lower at the sides, higher in the middle), of at most
// CORR_AMP_PS. Both are model choices, used only by the config_ro model.
// No clock; outputs follow the oscillators.
`timescale 1ns / 1ps
module ro_bank #(
  parameter int          NUM_RO      = 128,
  parameter int unsigned BASE_SEED   = 1,
  parameter int          CORR_AMP_PS = 40,
  parameter int          JITTER_PS   = 8
) (
  input  logic [NUM_RO-1:0]         en,
  input  logic [puf_pkg::CFG_W-1:0] cfg,
  output logic [NUM_RO-1:0]         ro_out
);

  // Systematic delay of oscillator i: CORR_AMP_PS * ((2i-(N-1))/(N-1))^2.
  function automatic int corr_ps(int i);
    int num, den;
    num = 2 * i - NUM_RO + 1;
    den = NUM_RO - 1;
    if (den == 0) return 0;
    return (CORR_AMP_PS * num * num) / (den * den);
  endfunction

  for (genvar i = 0; i < NUM_RO; i++) begin : g_ro
    config_ro #(
      .SEED      (BASE_SEED + i),
      .CORR_PS   (corr_ps(i)),
      .JITTER_PS (JITTER_PS)
    ) u_ro (
      .en     (en[i]),
      .cfg    (cfg),
      .ro_out (ro_out[i])
    );
  end

endmodule
