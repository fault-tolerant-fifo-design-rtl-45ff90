// Low-complexity fault-tolerant majority voter for triple modular redundancy.
//
// Each bit is voted by one exclusive-or gate and one 2:1 multiplexer:
//   S = A xor B,  V = (S == 0) ? B : C.
// If A and B agree (S = 0) they are the majority and B is passed on. If they
// disagree, one of them is the faulty module, so C holds the majority value
// and is passed on. A single stuck-at fault on the only internal node S is
// harmless while the three modules agree (A = B = C), because both multiplexer
// inputs then carry the same value. The gate-level structure is the one of the
// voter proposed in the design description; the WIDTH parameter, which
// replicates the single-bit voter across a bus, is this implementation's own.
//
// Interface: a, b, c are the outputs of the three redundant modules, v the voted
// value. Purely combinational, no clock.
module ft_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] v
);

  logic [WIDTH-1:0] s;  // per-bit select: 1 when modules A and B disagree

  always_comb begin
    s = a ^ b;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      v[i] = s[i] ? c[i] : b[i];
    end
  end

endmodule
