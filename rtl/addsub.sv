// addsub: N-bit adder-subtractor built from N one-bit full adders.
//
// Each B bit passes through an XOR with the sub line before entering its
// full adder, so the XOR acts as a conditional inverter: with sub=0 the
// chain computes A+B, with sub=1 it computes A+~B+1 = A-B, because sub is
// also the carry into bit 0. The carries ripple from bit 0 upward.
//
// Ports: a, b (N bits), sub (0 add, 1 subtract), s (N bits), cout (carry out
// of the top bit), ovf (signed overflow: carry into the top bit XOR carry out
// of it). Purely combinational.
module addsub #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         ovf
);

  logic [N:0]   c;
  logic [N-1:0] b_x;

  assign c[0] = sub;
  assign b_x  = b ^ {N{sub}};

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b_x[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
  assign ovf  = c[N] ^ c[N-1];

endmodule
