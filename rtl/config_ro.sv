// config_ro: behavioural model of one configurable ring oscillator.
//
// This is a simulation model, not synthesizable logic: a ring oscillator is a
// combinational loop whose frequency comes from gate delays. The structure
// follows the configurable RO of the PUF: an AND gate (enable) closes the ring,
// followed by three stages; each stage has two inverters in parallel and a
// 2:1 multiplexer that picks one of them. The selects c1, c2, c3 (cfg[2],
// cfg[1], cfg[0]) choose one of 2^3 = 8 loops that share the AND gate and
// multiplexers but use different inverters, so each configuration has its own
// frequency while fitting in a single logic block. Every loop has three
// inversions, so every configuration oscillates.
//
// Interface: en high lets the ring run; en low forces the AND output to 0 and
// the output settles high. cfg should be changed only while en is low.
// Timing: half period = AND delay + sum over the three stages of (selected
// inverter delay + mux delay) + a random jitter of 0..JITTER_PS.
//
// Process variation (this model's own choice): each of the six inverters gets
// NOM_INV_PS plus an offset in [-SPREAD_PS, +SPREAD_PS] drawn from a hash of
// SEED and the inverter index; CORR_PS adds a systematic (spatially correlated)
// delay to the AND gate. All delays are in picoseconds.
//
// Operating point (model only): ro_env_pkg::env_permille shifts every
// inverter delay by env_permille/1000 of itself, scaled per inverter by a
// hashed sensitivity of 100 +- ENV_SPREAD percent. At 0 the delays are the
// nominal ones above.
//
// A synthesis tool that ignores the delays sees one combinational loop per
// oscillator here; that loop is what a ring oscillator is.
`timescale 1ps / 1ps
module config_ro #(
  parameter int unsigned SEED       = 1,
  parameter int          CORR_PS    = 0,
  parameter int          NOM_INV_PS = 600,
  parameter int          NOM_MUX_PS = 400,
  parameter int          NOM_AND_PS = 700,
  parameter int          SPREAD_PS  = 30,
  parameter int          JITTER_PS  = 8,
  parameter int          ENV_SPREAD = 10
) (
  input  logic                  en,
  input  logic [puf_pkg::CFG_W-1:0] cfg,
  output logic                  ro_out
);

  // 32-bit integer hash giving the per-inverter process offset.
  function automatic int unsigned mix(int unsigned s, int unsigned k);
    int unsigned h;
    h = (s * 32'h9E3779B1) ^ (k * 32'h85EBCA6B);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return h;
  endfunction

  // Delay of inverter k (k = 2*stage + select), stage 0 is the c1 stage, at
  // the operating point ro_env_pkg::env_permille. Its sensitivity to the
  // operating point is (100 + s) % of the average, s hashed in +-ENV_SPREAD.
  function automatic int inv_delay(int k);
    int unsigned range, srange;
    int base, sens;
    range  = 2 * SPREAD_PS + 1;
    srange = 2 * ENV_SPREAD + 1;
    base = NOM_INV_PS + int'(mix(SEED, k) % range) - SPREAD_PS;
    sens = 100 + int'(mix(SEED, k + 16) % srange) - ENV_SPREAD;
    return base + (base * ro_env_pkg::env_permille * sens) / 100_000;
  endfunction

  function automatic int half_period(logic [puf_pkg::CFG_W-1:0] c);
    int d;
    d = NOM_AND_PS + CORR_PS;
    for (int st = 0; st < puf_pkg::CFG_W; st++)
      d += inv_delay(2 * st + int'(c[puf_pkg::CFG_W-1-st])) + NOM_MUX_PS;
    return d;
  endfunction

  initial ro_out = 1'b1;

  // One half period per pass: wait for the enable to rise if it is low, let
  // the ring delay elapse, then toggle, or rest high if the enable dropped
  // meanwhile.
  always begin
    if (!en) @(posedge en);
    #(half_period(cfg) + int'($urandom % (JITTER_PS + 1)));
    ro_out = en ? ~ro_out : 1'b1;
  end

endmodule
