// challenge_mem: the stored configuration (challenge) of every pair.
//
// Enrollment writes, for each of the NUM_RO-1 adjacent pairs, the
// configuration c1c2c3 with the largest frequency difference; generation
// reads it back. The host can also read the table out to keep it in its
// challenge database and load it again later. One synchronous write port and
// one asynchronous read port (a small LUT RAM on an FPGA); contents are
// cleared at reset, which is this design's choice.
`timescale 1ns / 1ps
module challenge_mem #(
  parameter int DEPTH = 127,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [puf_pkg::CFG_W-1:0] wdata,
  input  logic [AW-1:0]             raddr,
  output logic [puf_pkg::CFG_W-1:0] rdata
);

  logic [puf_pkg::CFG_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && int'(waddr) < DEPTH) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
