// Workload testbench: leaking the key of an AES-128 core through the
// barrier gates, at the top's default parameters.
//
// The AES core is not part of the RTL, so this bench carries its own
// AES-128 reference (S-box computed as the GF(2^8) inverse followed by the
// affine map, standard key expansion), checked first against the two
// FIPS-197 example vectors. Each block is then streamed through the top one
// byte per clock: ciphertext byte i on the cipher-text port with key byte i
// on the key port, as an 8-bit core would present them at its output
// register and key input. The bench reads the eight primary outputs:
//   - before the Trojan PIP is programmed, with the pin high: ciphertext;
//   - after the programming step sets the TPIP bit at its bit address, pin
//     low: ciphertext; pin high: the key, byte for byte, so the first key
//     byte appears first on the outputs.
module aes_key_leak_workload_tb;

  import trojan_pkg::*;

  localparam int unsigned   AW  = CFG_ADDR_BITS;
  localparam logic [AW-1:0] ADR = TPIP_BIT_ADDR;
  localparam int            N_RANDOM_BLOCKS = 20;

  typedef logic [7:0] block_t [16];

  logic          clk;
  logic          rst_n;
  logic          aes_we, and_we;
  logic [AW-1:0] aes_addr, and_addr;
  logic          aes_data, and_data;
  logic [7:0]    ct, key, aes_out;
  logic          aes_pin, aes_active;
  logic          a, b, and_pin, y;

  int checks   = 0;
  int failures = 0;
  int leaked_blocks = 0;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- AES-128
  function automatic logic [7:0] xtime(input logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] x, input logic [7:0] yv);
    logic [7:0] p, aa;
    p  = '0;
    aa = x;
    for (int i = 0; i < 8; i++) begin
      if (yv[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  // S-box: multiplicative inverse (x^254, 0 maps to 0), then affine map.
  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv;
    inv = 8'h01;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  logic [7:0] sbox_t [256];

  function automatic block_t aes128_encrypt(input block_t pt, input block_t k);
    logic [7:0] rk [176];
    logic [7:0] tmp [4];
    logic [7:0] rcon;
    logic [7:0] t0;
    block_t     s, sh;
    rcon = 8'h01;
    for (int i = 0; i < 16; i++) rk[i] = k[i];
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = rk[i - 4 + j];
      if (i % 16 == 0) begin
        t0 = tmp[0];
        tmp[0] = sbox_t[tmp[1]] ^ rcon;
        tmp[1] = sbox_t[tmp[2]];
        tmp[2] = sbox_t[tmp[3]];
        tmp[3] = sbox_t[t0];
        rcon = xtime(rcon);
      end
      for (int j = 0; j < 4; j++) rk[i + j] = rk[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ rk[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox_t[s[i]];
      // Byte i sits in row i%4, column i/4; row r rotates left by r.
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++)
          sh[rr + 4 * c] = s[rr + 4 * ((c + rr) % 4)];
      s = sh;
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] c0, c1, c2, c3;
          c0 = s[4*c]; c1 = s[4*c+1]; c2 = s[4*c+2]; c3 = s[4*c+3];
          s[4*c]   = gmul(c0, 2) ^ gmul(c1, 3) ^ c2 ^ c3;
          s[4*c+1] = c0 ^ gmul(c1, 2) ^ gmul(c2, 3) ^ c3;
          s[4*c+2] = c0 ^ c1 ^ gmul(c2, 2) ^ gmul(c3, 3);
          s[4*c+3] = gmul(c0, 3) ^ c1 ^ c2 ^ gmul(c3, 2);
        end
      end
      for (int i = 0; i < 16; i++) s[i] ^= rk[16 * r + i];
    end
    return s;
  endfunction

  function automatic block_t from128(input logic [127:0] v);
    block_t r;
    for (int i = 0; i < 16; i++) r[i] = v[127 - 8 * i -: 8];
    return r;
  endfunction

  function automatic logic [127:0] to128(input block_t bl);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8 * i -: 8] = bl[i];
    return v;
  endfunction

  task automatic check_vector(input logic [127:0] k, input logic [127:0] p,
                              input logic [127:0] c);
    logic [127:0] got;
    got = to128(aes128_encrypt(from128(p), from128(k)));
    checks++;
    if (got !== c) begin
      failures++;
      $display("FAIL: AES reference: got %032h expected %032h", got, c);
    end
  endtask

  // ----------------------------------------------------------- streaming
  // Present one block byte by byte; the outputs must show the ciphertext
  // or, when leak is expected, the key.
  task automatic stream_block(input block_t c, input block_t k, input logic pin,
                              input logic expect_leak, input string what);
    logic [127:0] seen;
    aes_pin = pin;
    for (int i = 0; i < 16; i++) begin
      ct = c[i]; key = k[i];
      #1;
      seen[127 - 8 * i -: 8] = aes_out;
      checks += 2;
      if (aes_active !== expect_leak || y !== 1'b0) begin
        failures++;
        $display("FAIL: %s byte %0d: enable=%0b AND-demo output=%0b", what, i, aes_active, y);
      end
      if (aes_out !== (expect_leak ? k[i] : c[i])) begin
        failures++;
        $display("FAIL: %s byte %0d: out=%02h ct=%02h key=%02h", what, i, aes_out, c[i], k[i]);
      end
      @(negedge clk);
    end
    if (expect_leak && seen == to128(k)) leaked_blocks++;
  endtask

  task automatic cfg_write(input logic [AW-1:0] ad, input logic d);
    @(negedge clk);
    aes_we = 1'b1; aes_addr = ad; aes_data = d;
    @(negedge clk);
    aes_we = 1'b0;
  endtask

  initial begin
    block_t k, p, c;
    rst_n = 1'b0;
    aes_we = 1'b0; and_we = 1'b0; aes_addr = '0; and_addr = '0;
    aes_data = 1'b0; and_data = 1'b0;
    ct = '0; key = '0; aes_pin = 1'b0; a = 1'b0; b = 1'b0; and_pin = 1'b0;
    for (int i = 0; i < 256; i++) sbox_t[i] = sbox(8'(i));

    // Reference check: FIPS-197 Appendix B and Appendix C.1.
    check_vector(128'h2b7e151628aed2a6abf7158809cf4f3c,
                 128'h3243f6a8885a308d313198a2e0370734,
                 128'h3925841d02dc09fbdc118597196a0b32);
    check_vector(128'h000102030405060708090a0b0c0d0e0f,
                 128'h00112233445566778899aabbccddeeff,
                 128'h69c4e0d86a7b0430d8cdb78070b4c55a);

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    k = from128(128'h2b7e151628aed2a6abf7158809cf4f3c);
    p = from128(128'h3243f6a8885a308d313198a2e0370734);
    c = aes128_encrypt(p, k);

    // Bitstream as written: TPIP bit 0. The pin does nothing.
    cfg_write(ADR, 1'b0);
    stream_block(c, k, 1'b1, 1'b0, "dormant, pin high");

    // Programming step sets the TPIP bit.
    cfg_write(ADR, 1'b1);
    stream_block(c, k, 1'b0, 1'b0, "programmed, pin low");
    stream_block(c, k, 1'b1, 1'b1, "programmed, pin high");
    checks++;
    if (leaked_blocks != 1) begin
      failures++;
      $display("FAIL: FIPS-197 key not recovered from the outputs");
    end else begin
      $display("first key byte read from the outputs: %02h", k[0]);
    end

    // Random keys and plaintexts.
    for (int n = 0; n < N_RANDOM_BLOCKS; n++) begin
      for (int i = 0; i < 16; i++) begin
        k[i] = 8'($urandom);
        p[i] = 8'($urandom);
      end
      c = aes128_encrypt(p, k);
      stream_block(c, k, 1'b0, 1'b0, "random, pin low");
      stream_block(c, k, 1'b1, 1'b1, "random, pin high");
    end
    checks++;
    if (leaked_blocks != N_RANDOM_BLOCKS + 1) begin
      failures++;
      $display("FAIL: %0d of %0d keys recovered", leaked_blocks, N_RANDOM_BLOCKS + 1);
    end
    $display("keys recovered from the outputs: %0d", leaked_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
