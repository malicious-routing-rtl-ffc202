// End-to-end testbench for malicious_routing_top, at the top's default
// parameters.
//
// Models the life of an infected design from the programmer's side:
//   1. Bitstream as written after place-and-route: a full-length image
//      (32,220 bytes, the size of an iCE40HX1K bitstream) of random bits in
//      which the TPIP bit is 0. Each design gets its own image, shifted in
//      one bit per clock through its configuration port. The designs must
//      then behave as the originals whatever the trigger pins do.
//   2. The programming step finds the TPIP bit and flips it to 1, and the
//      whole image is loaded again. With the pins low the outputs are still
//      the original ones; with the pins high the AES outputs carry the key
//      byte and the AND-gate output carries b.
//   3. A clean image (TPIP bit 0) is loaded again: dormant once more.
// The AES core is replaced by random cipher-text and key bytes applied at
// its output register and key input.
//
// Each mechanism is counted: dormant with pin high, clean output with the
// TPIP closed and pin low, key leak, b leak, pin-controlled switching
// between original and Trojan output, and return to dormant after a clean
// reload. A mechanism that never happened counts as a failure.
module malicious_routing_top_tb;

  import trojan_pkg::*;

  localparam int unsigned   AW         = CFG_ADDR_BITS;
  localparam logic [AW-1:0] ADR        = TPIP_BIT_ADDR;
  localparam int unsigned   IMAGE_BITS = 32220 * 8;

  logic          clk;
  logic          rst_n;
  logic          aes_we, and_we;
  logic [AW-1:0] aes_addr, and_addr;
  logic          aes_data, and_data;
  logic [7:0]    ct, key, aes_out;
  logic          aes_pin, aes_active;
  logic          a, b, and_pin, y;

  // Configuration images: one per design.
  logic          aes_image [IMAGE_BITS];
  logic          and_image [IMAGE_BITS];

  int checks   = 0;
  int failures = 0;
  int n_dormant = 0, n_clean_closed = 0, n_key_leak = 0, n_b_leak = 0;
  int n_switch = 0, n_redormant = 0;
  longint unsigned load_cycles;

  malicious_routing_top dut (
    .clk                 (clk),
    .rst_n               (rst_n),
    .aes_cfg_we_i        (aes_we),
    .aes_cfg_addr_i      (aes_addr),
    .aes_cfg_data_i      (aes_data),
    .aes_ct_i            (ct),
    .aes_key_i           (key),
    .aes_trig_pin_i      (aes_pin),
    .aes_out_o           (aes_out),
    .aes_trojan_active_o (aes_active),
    .and_cfg_we_i        (and_we),
    .and_cfg_addr_i      (and_addr),
    .and_cfg_data_i      (and_data),
    .and_a_i             (a),
    .and_b_i             (b),
    .and_trig_pin_i      (and_pin),
    .and_y_o             (y)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (4 * IMAGE_BITS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift both images in, one bit of each per clock.
  task automatic load_images();
    longint unsigned t0;
    t0 = 0;
    @(negedge clk);
    for (int unsigned i = 0; i < IMAGE_BITS; i++) begin
      aes_we = 1'b1; aes_addr = AW'(i); aes_data = aes_image[i];
      and_we = 1'b1; and_addr = AW'(i); and_data = and_image[i];
      @(negedge clk);
      t0++;
    end
    aes_we = 1'b0; and_we = 1'b0;
    load_cycles = t0;
  endtask

  // Programming tool: locate the TPIP bit and set it.
  task automatic flip_tpip(input logic v);
    aes_image[ADR] = v;
    and_image[ADR] = v;
  endtask

  // Random operation of both designs; closed = state of the TPIP.
  task automatic operate(input logic closed, input int n, input string phase);
    for (int i = 0; i < n; i++) begin
      logic [7:0] exp_out;
      logic       exp_y;
      ct      = 8'($urandom);
      key     = 8'($urandom);
      aes_pin = 1'($urandom);
      {a, b}  = 2'($urandom);
      and_pin = 1'($urandom);
      #1;
      exp_out = (closed && aes_pin) ? key : ct;
      exp_y   = (closed && and_pin) ? b : (a && b);
      checks += 2;
      if (aes_out !== exp_out) begin
        failures++;
        $display("FAIL: %s AES: pin=%0b ct=%02h key=%02h out=%02h", phase, aes_pin, ct, key, aes_out);
      end
      if (y !== exp_y) begin
        failures++;
        $display("FAIL: %s AND: pin=%0b a=%0b b=%0b y=%0b", phase, and_pin, a, b, y);
      end
      if (!closed && aes_pin && aes_out == ct && ct != key) n_dormant++;
      if (closed && !aes_pin && aes_out == ct && ct != key) n_clean_closed++;
      if (closed && aes_pin && aes_out == key && ct != key) n_key_leak++;
      if (closed && and_pin && !a && b && y) n_b_leak++;
      @(negedge clk);
    end
  endtask

  task automatic check_mechanism(input int n, input string name);
    checks++;
    $display("%-32s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", name);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    aes_we = 1'b0; and_we = 1'b0; aes_addr = '0; and_addr = '0;
    aes_data = 1'b0; and_data = 1'b0;
    ct = '0; key = '0; aes_pin = 1'b0; a = 1'b0; b = 1'b0; and_pin = 1'b0;
    for (int unsigned i = 0; i < IMAGE_BITS; i++) begin
      aes_image[i] = 1'($urandom);
      and_image[i] = 1'($urandom);
    end
    // Place-and-route leaves the Trojan unconnected.
    flip_tpip(1'b0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Load the bitstream as written.
    load_images();
    checks++;
    if (load_cycles != longint'(IMAGE_BITS)) begin
      failures++;
      $display("FAIL: image load took %0d cycles, expected %0d", load_cycles, IMAGE_BITS);
    end
    checks++;
    if (aes_active !== 1'b0) begin
      failures++;
      $display("FAIL: Trojan enable high after loading the bitstream as written");
    end
    operate(1'b0, 500, "bitstream as written");

    // 2. Malicious programming: TPIP bit flipped, image reloaded.
    flip_tpip(1'b1);
    load_images();
    operate(1'b1, 1000, "programmed");

    // Pin-controlled switching between original and Trojan output.
    for (int i = 0; i < 20; i++) begin
      ct = 8'($urandom); key = ~ct;
      aes_pin = 1'b0; #1;
      checks++;
      if (aes_out !== ct) begin failures++; $display("FAIL: switch, pin low"); end
      aes_pin = 1'b1; #1;
      checks++;
      if (aes_out !== key) begin failures++; $display("FAIL: switch, pin high"); end
      else n_switch++;
      @(negedge clk);
    end

    // 3. Clean image: dormant again.
    flip_tpip(1'b0);
    load_images();
    aes_pin = 1'b1; ct = 8'h5A; key = 8'hA5; #1;
    checks++;
    if (aes_out !== 8'h5A) begin failures++; $display("FAIL: not dormant after clean reload"); end
    else n_redormant++;
    operate(1'b0, 200, "clean reload");

    check_mechanism(n_dormant,      "dormant with pin high");
    check_mechanism(n_clean_closed, "clean output, TPIP closed");
    check_mechanism(n_key_leak,     "key byte leaked");
    check_mechanism(n_b_leak,       "AND demo leaks b");
    check_mechanism(n_switch,       "pin switches to Trojan");
    check_mechanism(n_redormant,    "dormant after clean reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
