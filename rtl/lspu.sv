// lspu: last stage processing unit (hard decision unit).
//
// Decides the four bits u0..u3 of a 4-LLR node in a single combinational
// step, replacing the two radix-2 stages and four decisions of a classic SC
// decoder. Bit i of `info` is 1 when u_i carries data and 0 when it is
// frozen to zero. Because bit 2j-1 of a pair is always the less reliable
// one, only six patterns can occur (info = 0000, 1000, 1100, 1010, 1110,
// 1111 written u3..u0). s_i is the sign bit of L_i, s_ij the sign of
// L_i + L_j and s_0123 the sign of the sum of all four.
//   0000  all frozen            : u = 0
//   1000  only u3               : u3 = s_0123
//   1100  u2,u3                 : u2 = s_02 ^ s_13, u3 = s_13
//   1010  u1,u3                 : u1 = s_01 ^ s_23, u3 = s_23
//   1110  u0 frozen             : closed form of the min-sum SC decisions,
//                                 chosen by comparing min(|L1|,|L3|) with
//                                 min(|L0|,|L2|) and |L1| with |L3| or
//                                 |L0| with |L2|
//   1111  no frozen bit         : u = (s0..s3) * G4
// Any other pattern cannot come out of a reliability-ordered code
// construction; the unit then outputs zeros and raises `bad`.
//
// For the 1110 case the unit uses the branch condition that follows from the
// min-sum derivation (u1 takes the sign of the f term with the larger
// magnitude); the u3 of pattern 1100 is s_13 as the decision rule derives.
// Except for 1010, the rules equal step-by-step min-sum SC when no
// magnitudes tie; the 1010 rule is a sign-only shortcut for u3.
// Combinational, no clock.
module lspu #(
  parameter int unsigned Q = 5  // LLR width in bits
) (
  input  logic signed [Q-1:0] l [4],  // L0..L3
  input  logic        [3:0]   info,   // 1 = data bit, 0 = frozen
  output logic        [3:0]   u,      // decided bits u0..u3
  output logic                bad     // pattern outside the six legal ones
);

  localparam int unsigned W = Q + 2;

  logic signed [W-1:0] e [4];
  logic [W-1:0] m [4];
  logic [3:0] s;
  logic signed [W-1:0] sum01, sum23, sum02, sum13, sum_all;
  logic s01, s23, s02, s13, s0123;
  logic [W-1:0] min02, min13;

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      e[q] = W'(l[q]);
      s[q] = l[q][Q-1];
      m[q] = e[q][W-1] ? W'(-e[q]) : W'(e[q]);
    end
    sum01   = e[0] + e[1];
    sum23   = e[2] + e[3];
    sum02   = e[0] + e[2];
    sum13   = e[1] + e[3];
    sum_all = sum01 + sum23;
    s01   = sum01[W-1];
    s23   = sum23[W-1];
    s02   = sum02[W-1];
    s13   = sum13[W-1];
    s0123 = sum_all[W-1];
    min02 = (m[0] < m[2]) ? m[0] : m[2];
    min13 = (m[1] < m[3]) ? m[1] : m[3];

    u   = 4'b0000;
    bad = 1'b0;
    unique case (info)
      4'b0000: u = 4'b0000;
      4'b1000: u[3] = s0123;
      4'b1100: begin
        u[2] = s02 ^ s13;
        u[3] = s13;
      end
      4'b1010: begin
        u[1] = s01 ^ s23;
        u[3] = s23;
      end
      4'b1110: begin
        if (min13 < min02) begin
          u[1] = s[0] ^ s[2];
          if (m[1] < m[3]) begin
            u[2] = s[2] ^ s[3];
            u[3] = s[3];
          end else begin
            u[2] = s[0] ^ s[1];
            u[3] = s[0] ^ s[1] ^ s[2];
          end
        end else begin
          u[1] = s[1] ^ s[3];
          u[3] = s[3];
          u[2] = (m[0] < m[2]) ? (s[2] ^ s[3]) : (s[0] ^ s[1]);
        end
      end
      4'b1111: begin
        u[0] = s[0] ^ s[1] ^ s[2] ^ s[3];
        u[1] = s[1] ^ s[3];
        u[2] = s[2] ^ s[3];
        u[3] = s[3];
      end
      default: bad = 1'b1;
    endcase
  end

endmodule
