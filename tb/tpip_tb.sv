// Self-checking testbench for tpip.
//
// Checks that the configuration exp_cell comes out of reset open, ignores
// writes to other addresses and writes with the strobe low, closes one
// clock edge after a write of 1 to its own address, opens again on a write
// of 0, and is cleared by the asynchronous reset. In every state the sink is
// compared with (exp_cell AND source) for both source levels.
module tpip_tb;

  localparam int unsigned AW   = trojan_pkg::CFG_ADDR_BITS;
  localparam logic [AW-1:0] ADR = trojan_pkg::TPIP_BIT_ADDR;

  logic          clk;
  logic          rst_n;
  logic          we;
  logic [AW-1:0] addr;
  logic          data;
  logic          src;
  logic          sink, connected;

  int checks   = 0;
  int failures = 0;

  tpip dut (
    .clk(clk), .rst_n(rst_n), .cfg_we_i(we), .cfg_addr_i(addr),
    .cfg_data_i(data), .src_i(src), .sink_o(sink), .connected_o(connected)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the exp_cell and the switch for both source levels.
  task automatic expect_state(input logic exp_cell, input string what);
    checks++;
    if (connected !== exp_cell) begin
      failures++;
      $display("FAIL: %s: cell=%0b expected %0b", what, connected, exp_cell);
    end
    for (int s = 0; s < 2; s++) begin
      src = s[0];
      #1;
      checks++;
      if (sink !== (exp_cell && s[0])) begin
        failures++;
        $display("FAIL: %s: src=%0d sink=%0b", what, s, sink);
      end
    end
  endtask

  task automatic cfg_write(input logic [AW-1:0] a, input logic d, input logic strobe);
    @(negedge clk);
    we = strobe; addr = a; data = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; data = 1'b0; src = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_state(1'b0, "after reset");

    // Neighbouring and random other addresses do not touch the exp_cell.
    cfg_write(ADR + 1, 1'b1, 1'b1);
    cfg_write(ADR - 1, 1'b1, 1'b1);
    for (int i = 0; i < 50; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      if (a == ADR) a = a ^ 1;
      cfg_write(a, 1'b1, 1'b1);
    end
    expect_state(1'b0, "writes to other addresses");

    // Strobe low: nothing.
    cfg_write(ADR, 1'b1, 1'b0);
    expect_state(1'b0, "strobe low");

    // Write of 1 at the TPIP address: closed after exactly one edge.
    @(negedge clk);
    we = 1'b1; addr = ADR; data = 1'b1;
    checks++;
    if (connected !== 1'b0) begin
      failures++;
      $display("FAIL: exp_cell changed before the clock edge");
    end
    @(posedge clk); #1;
    we = 1'b0;
    expect_state(1'b1, "one edge after write of 1");

    // Other addresses with data 0 leave it closed.
    cfg_write(ADR ^ 18'h00100, 1'b0, 1'b1);
    expect_state(1'b1, "write of 0 elsewhere");

    // Write of 0 opens it.
    cfg_write(ADR, 1'b0, 1'b1);
    expect_state(1'b0, "write of 0");

    // Close, then asynchronous reset between edges.
    cfg_write(ADR, 1'b1, 1'b1);
    expect_state(1'b1, "closed again");
    #2 rst_n = 1'b0;
    #1;
    expect_state(1'b0, "asynchronous reset");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
