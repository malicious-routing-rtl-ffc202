// Demonstration design: a two-input AND gate infected with one barrier gate.
//
// The original design drives y = a AND b. A single 2:1 barrier multiplexer
// sits before the output: I0 is the AND result, I1 is input b. Its enable
// comes from an otherwise unused input pin through the Trojan PIP. With the
// TPIP open (as written in the bitstream) the output is always a AND b.
// With the TPIP closed and the pin high, the output shows b itself, so the
// AND function is bypassed and b leaks.
//
// The output path is combinational; the TPIP cell is written on the rising
// edge of clk and cleared by rst_n. The TPIP address of this design is not
// known; it defaults to the value of the AES example.
module and_gate_demo #(
  parameter int unsigned           CFG_ADDR_W = trojan_pkg::CFG_ADDR_BITS,
  parameter logic [CFG_ADDR_W-1:0] TPIP_ADDR  = trojan_pkg::TPIP_BIT_ADDR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we_i,
  input  logic [CFG_ADDR_W-1:0] cfg_addr_i,
  input  logic                  cfg_data_i,
  input  logic                  a_i,
  input  logic                  b_i,
  input  logic                  trig_pin_i,   // unused I/O pin
  output logic                  y_o
);

  logic y_orig;
  logic sel;
  logic tpip_closed;

  // Original design.
  always_comb y_orig = a_i & b_i;

  tpip #(
    .CFG_ADDR_W (CFG_ADDR_W),
    .BIT_ADDR   (TPIP_ADDR)
  ) u_tpip (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_we_i    (cfg_we_i),
    .cfg_addr_i  (cfg_addr_i),
    .cfg_data_i  (cfg_data_i),
    .src_i       (trig_pin_i),
    .sink_o      (sel),
    .connected_o (tpip_closed)
  );

  barrier_gates #(
    .WIDTH (1)
  ) u_barrier (
    .orig_i (y_orig),
    .leak_i (b_i),
    .sel_i  (sel),
    .out_o  (y_o)
  );

  always_comb begin
    if (!tpip_closed) begin
      assert (y_o == y_orig)
        else $error("and_gate_demo: output differs from a AND b while TPIP is open");
    end
  end

endmodule
