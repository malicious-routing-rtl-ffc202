// Self-checking testbench for barrier_gates.
//
// Drives an 8-bit bank (the default) and a 1-bit bank with random original
// and leak values and both select levels, and compares each output with a
// bitwise AND/OR reference: out = (orig & ~S) | (leak & S). The block is
// combinational, so each check is taken 1 ns after the inputs change.
module barrier_gates_tb;

  localparam int unsigned W = 8;

  logic [W-1:0] orig, leak, out8;
  logic         sel;
  logic         o1, l1, out1;

  int checks   = 0;
  int failures = 0;

  barrier_gates dut8 (.orig_i(orig), .leak_i(leak), .sel_i(sel), .out_o(out8));
  barrier_gates #(.WIDTH(1)) dut1 (.orig_i(o1), .leak_i(l1), .sel_i(sel), .out_o(out1));

  task automatic check8();
    logic [W-1:0] expected;
    expected = (orig & ~{W{sel}}) | (leak & {W{sel}});
    checks++;
    if (out8 !== expected) begin
      failures++;
      $display("FAIL: sel=%0b orig=%02h leak=%02h out=%02h expected=%02h",
               sel, orig, leak, out8, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: all ones against all zeros, both ways.
    for (int s = 0; s < 2; s++) begin
      sel = s[0]; orig = '1; leak = '0; #1 check8();
      sel = s[0]; orig = '0; leak = '1; #1 check8();
      sel = s[0]; orig = 8'hA5; leak = 8'h5A; #1 check8();
    end
    // Random.
    for (int i = 0; i < 500; i++) begin
      orig = W'($urandom);
      leak = W'($urandom);
      sel  = 1'($urandom);
      #1 check8();
    end
    // One-bit bank, exhaustive.
    for (int v = 0; v < 8; v++) begin
      {sel, o1, l1} = 3'(v);
      #1;
      checks++;
      if (out1 !== (sel ? l1 : o1)) begin
        failures++;
        $display("FAIL: 1-bit sel=%0b orig=%0b leak=%0b out=%0b", sel, o1, l1, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
