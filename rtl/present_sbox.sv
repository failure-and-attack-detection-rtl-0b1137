// 4-bit S-box of the PRESENT block cipher: the circuit the sensor protects.
//
// A combinational 4-in/4-out substitution. The table is the one the PRESENT cipher
// specification defines (hex, inputs 0..F):  C 5 6 B 9 0 A D 3 E F 8 4 7 1 2.
// Interface: x in, y = S(x) out. No clock; the surrounding registers time it.
// That the protected circuit is the PRESENT S-box follows the published sensor system;
// the table itself comes from the cipher's specification.
module present_sbox (
  input  logic [3:0] x,
  output logic [3:0] y
);
  always_comb begin
    unique case (x)
      4'h0: y = 4'hC;
      4'h1: y = 4'h5;
      4'h2: y = 4'h6;
      4'h3: y = 4'hB;
      4'h4: y = 4'h9;
      4'h5: y = 4'h0;
      4'h6: y = 4'hA;
      4'h7: y = 4'hD;
      4'h8: y = 4'h3;
      4'h9: y = 4'hE;
      4'hA: y = 4'hF;
      4'hB: y = 4'h8;
      4'hC: y = 4'h4;
      4'hD: y = 4'h7;
      4'hE: y = 4'h1;
      4'hF: y = 4'h2;
      default: y = 4'h0;
    endcase
  end
endmodule
