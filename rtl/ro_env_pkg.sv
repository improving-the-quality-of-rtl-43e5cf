// ro_env_pkg: simulated operating point for the ring-oscillator model.
//
// Simulation only. A supply-voltage or temperature change slows or speeds up
// every gate, but not every gate by the same amount. env_permille is the
// average delay change in parts per thousand (0 = nominal; positive = slower,
// as at low voltage or high temperature). The oscillator model scales each
// inverter by its own sensitivity around this average, so close oscillator
// pairs can swap order as the operating point moves. A testbench sets it
// directly (ro_env_pkg::env_permille = ...); nothing in the synthesizable
// logic reads it.
`timescale 1ns / 1ps
package ro_env_pkg;

  int env_permille = 0;

endpackage
