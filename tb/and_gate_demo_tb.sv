// Self-checking testbench for and_gate_demo.
//
// Runs the full truth table over a, b and the trigger pin in three states:
// unconfigured, configured with the TPIP bit 0 (as in the bitstream), and
// configured with the TPIP bit 1. Expected: a AND b, except b itself when
// the TPIP is closed and the pin is high.
module and_gate_demo_tb;

  localparam int unsigned   AW  = trojan_pkg::CFG_ADDR_BITS;
  localparam logic [AW-1:0] ADR = trojan_pkg::TPIP_BIT_ADDR;

  logic          clk;
  logic          rst_n;
  logic          we;
  logic [AW-1:0] addr;
  logic          data;
  logic          a, b, pin, y;

  int checks   = 0;
  int failures = 0;

  and_gate_demo dut (
    .clk(clk), .rst_n(rst_n), .cfg_we_i(we), .cfg_addr_i(addr), .cfg_data_i(data),
    .a_i(a), .b_i(b), .trig_pin_i(pin), .y_o(y)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [AW-1:0] ad, input logic d);
    @(negedge clk);
    we = 1'b1; addr = ad; data = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic truth_table(input logic closed, input string what);
    for (int v = 0; v < 8; v++) begin
      logic exp_y;
      {pin, a, b} = 3'(v);
      #1;
      case ({closed, pin, a, b})
        4'b0000, 4'b0001, 4'b0010, 4'b0100, 4'b0101, 4'b0110,
        4'b1000, 4'b1001, 4'b1010, 4'b1100, 4'b1110: exp_y = 1'b0;
        default:                                       exp_y = 1'b1;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL: %s pin=%0b a=%0b b=%0b y=%0b expected %0b", what, pin, a, b, y, exp_y);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; data = 1'b0; a = 0; b = 0; pin = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    truth_table(1'b0, "unconfigured");
    cfg_write(ADR, 1'b0);
    truth_table(1'b0, "bitstream");
    cfg_write(ADR, 1'b1);
    truth_table(1'b1, "programmed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
