// Trojan programmable interconnect point (TPIP).
//
// An FPGA routing switch together with the configuration memory cell that
// controls it. The cell is written from the bitstream: a write with
// cfg_we_i high and cfg_addr_i equal to BIT_ADDR stores cfg_data_i; writes
// to any other address leave it alone. While the cell holds 1 the switch
// is closed and sink_o follows src_i; while it holds 0 the sink net is
// disconnected, which this model reads as 0 (an undriven enable line is
// taken as low, the state in which the barrier gates pass the original
// output).
//
// In the attack the place-and-route step writes this cell as 0 into the
// bitstream, so every bitstream-level check sees the Trojan unconnected;
// the programming step writes it as 1 on its way into the device.
//
// Timing: the cell is written on the rising edge of clk; sink_o follows
// the cell and src_i combinationally. rst_n (active low, asynchronous)
// clears the cell, standing for an unconfigured device. The flat
// bit-address write port and the reset value are this model's choices; the
// real device loads its configuration in frames.
module tpip #(
  parameter int unsigned                 CFG_ADDR_W = trojan_pkg::CFG_ADDR_BITS,
  parameter logic [CFG_ADDR_W-1:0]       BIT_ADDR   = trojan_pkg::TPIP_BIT_ADDR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we_i,
  input  logic [CFG_ADDR_W-1:0] cfg_addr_i,
  input  logic                  cfg_data_i,
  input  logic                  src_i,        // driving net
  output logic                  sink_o,       // driven net
  output logic                  connected_o   // configuration cell
);

  logic cell_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_q <= 1'b0;
    end else if (cfg_we_i && (cfg_addr_i == BIT_ADDR)) begin
      cell_q <= cfg_data_i;
    end
  end

  assign connected_o = cell_q;
  assign sink_o      = cell_q & src_i;

endmodule
