// Self-checking testbench for aes_key_leak.
//
// Two instances: one with the enable routed from an unused pin (default),
// one with the enable tied to constant 1. Each goes through the life of the
// infected design: reset (unconfigured), configured from the bitstream as
// written after place-and-route (TPIP cell 0), then reconfigured with the
// TPIP bit flipped to 1. In every phase random cipher-text and key bytes
// and pin levels are applied and the outputs compared with what the phase
// should give: cipher text while dormant or with the pin low, the key byte
// once triggered.
module aes_key_leak_tb;

  import trojan_pkg::*;

  localparam int unsigned    AW  = CFG_ADDR_BITS;
  localparam logic [AW-1:0]  ADR = TPIP_BIT_ADDR;

  logic          clk;
  logic          rst_n;
  logic          we;
  logic [AW-1:0] addr;
  logic          data;
  logic [7:0]    ct, key;
  logic          pin;
  logic [7:0]    out_pin, out_one;
  logic          act_pin, act_one;

  int checks   = 0;
  int failures = 0;
  int leaks    = 0;

  aes_key_leak dut_pin (
    .clk(clk), .rst_n(rst_n), .cfg_we_i(we), .cfg_addr_i(addr), .cfg_data_i(data),
    .ct_i(ct), .key_i(key), .trig_pin_i(pin), .out_o(out_pin), .trojan_active_o(act_pin)
  );

  aes_key_leak #(.ENABLE_SRC(EN_CONST_ONE)) dut_one (
    .clk(clk), .rst_n(rst_n), .cfg_we_i(we), .cfg_addr_i(addr), .cfg_data_i(data),
    .ct_i(ct), .key_i(key), .trig_pin_i(pin), .out_o(out_one), .trojan_active_o(act_one)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [AW-1:0] a, input logic d);
    @(negedge clk);
    we = 1'b1; addr = a; data = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  // Apply random data; tpip_bit is what the bitstream put into the TPIP.
  task automatic run_phase(input logic tpip_bit, input int n, input string phase);
    for (int i = 0; i < n; i++) begin
      logic [7:0] exp_pin, exp_one;
      ct  = 8'($urandom);
      key = 8'($urandom);
      pin = 1'($urandom);
      #1;
      exp_pin = (tpip_bit && pin) ? key : ct;
      exp_one = tpip_bit ? key : ct;
      checks += 4;
      if (out_pin !== exp_pin) begin
        failures++;
        $display("FAIL: %s pin-enabled: pin=%0b ct=%02h key=%02h out=%02h", phase, pin, ct, key, out_pin);
      end
      if (act_pin !== (tpip_bit && pin)) begin
        failures++;
        $display("FAIL: %s pin-enabled: active=%0b", phase, act_pin);
      end
      if (out_one !== exp_one) begin
        failures++;
        $display("FAIL: %s const-one: ct=%02h key=%02h out=%02h", phase, ct, key, out_one);
      end
      if (act_one !== tpip_bit) begin
        failures++;
        $display("FAIL: %s const-one: active=%0b", phase, act_one);
      end
      if (tpip_bit && pin && ct != key) leaks++;
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; data = 1'b0; ct = '0; key = '0; pin = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_phase(1'b0, 100, "unconfigured");

    // Bitstream as written by place-and-route: TPIP bit 0, neighbours 1.
    cfg_write(ADR - 1, 1'b1);
    cfg_write(ADR,     1'b0);
    cfg_write(ADR + 1, 1'b1);
    run_phase(1'b0, 200, "dormant");

    // Programming with the TPIP bit flipped.
    cfg_write(ADR, 1'b1);
    run_phase(1'b1, 300, "activated");

    // Pin switched deliberately: original, Trojan, original.
    ct = 8'h3C; key = 8'hC3;
    pin = 1'b0; #1; checks++; if (out_pin !== 8'h3C) begin failures++; $display("FAIL: pin low"); end
    pin = 1'b1; #1; checks++; if (out_pin !== 8'hC3) begin failures++; $display("FAIL: pin high"); end
    pin = 1'b0; #1; checks++; if (out_pin !== 8'h3C) begin failures++; $display("FAIL: pin low again"); end

    // Reprogrammed with a clean bitstream: dormant again.
    cfg_write(ADR, 1'b0);
    run_phase(1'b0, 100, "clean reprogram");

    checks++;
    if (leaks == 0) begin
      failures++;
      $display("FAIL: key leak never observed");
    end
    $display("key leaks observed: %0d", leaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
