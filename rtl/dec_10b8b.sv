`timescale 1ns / 1ps
// dec_10b8b: combinational 10b/8b decoder.
//
// The symbol {a,b,c,d,e,i,f,g,h,j} (bit 9 = a, the first bit received) is
// split into a 6-bit and a 4-bit group, and each group is looked up in a
// table that lists both disparity forms. Control characters are recognised
// by the 6-bit codes 001111 and 110000 (K28.y), as the documented decoder
// does, and also by the x.7 alternate form (1000 or 0111) after the 6-bit
// codes of 23, 27, 29 and 30 (K23.7, K27.7, K29.7, K30.7): the link's start
// character is K27.7, so this second rule is needed. The invalid flag follows
// the documented rule only: a symbol is invalid when it does not hold 4, 5 or
// 6 ones. Disparity errors and codes missing from the tables are not flagged;
// such a code decodes to 0 in the group concerned.
//
// No clock; the caller registers the result.
module dec_10b8b (
  input  logic [9:0] data_in,
  output logic [7:0] data_out,
  output logic       k_out,
  output logic       invalid
);

  logic [5:0] six;
  logic [3:0] four;
  logic [4:0] x;
  logic [2:0] y;
  logic       is_k28, is_alt7, x_is_kx7;

  assign six  = data_in[9:4];
  assign four = data_in[3:0];

  // 6b/5b table, both running-disparity forms
  always_comb begin
    unique case (six)
      6'b100111, 6'b011000: x = 5'd0;
      6'b011101, 6'b100010: x = 5'd1;
      6'b101101, 6'b010010: x = 5'd2;
      6'b110001:            x = 5'd3;
      6'b110101, 6'b001010: x = 5'd4;
      6'b101001:            x = 5'd5;
      6'b011001:            x = 5'd6;
      6'b111000, 6'b000111: x = 5'd7;
      6'b111001, 6'b000110: x = 5'd8;
      6'b100101:            x = 5'd9;
      6'b010101:            x = 5'd10;
      6'b110100:            x = 5'd11;
      6'b001101:            x = 5'd12;
      6'b101100:            x = 5'd13;
      6'b011100:            x = 5'd14;
      6'b010111, 6'b101000: x = 5'd15;
      6'b011011, 6'b100100: x = 5'd16;
      6'b100011:            x = 5'd17;
      6'b010011:            x = 5'd18;
      6'b110010:            x = 5'd19;
      6'b001011:            x = 5'd20;
      6'b101010:            x = 5'd21;
      6'b011010:            x = 5'd22;
      6'b111010, 6'b000101: x = 5'd23;
      6'b110011, 6'b001100: x = 5'd24;
      6'b100110:            x = 5'd25;
      6'b010110:            x = 5'd26;
      6'b110110, 6'b001001: x = 5'd27;
      6'b001110,
      6'b001111, 6'b110000: x = 5'd28;
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      default:              x = 5'd0;
    endcase
  end

  assign is_k28   = (six == 6'b001111) || (six == 6'b110000);
  assign x_is_kx7 = (x == 5'd23) || (x == 5'd27) || (x == 5'd29) || (x == 5'd30);
  assign is_alt7  = (four == 4'b1000) || (four == 4'b0111);

  // 4b/3b table. After 001111 the K28 4-bit code is the complement of the
  // data form for the balanced codes, so it is looked up complemented.
  always_comb begin
    logic [3:0] f;
    f = (six == 6'b110000) ? ~four : four;
    if (is_k28) begin
      unique case (f)
        4'b0100: y = 3'd0;
        4'b1001: y = 3'd1;
        4'b0101: y = 3'd2;
        4'b0011: y = 3'd3;
        4'b0010: y = 3'd4;
        4'b1010: y = 3'd5;
        4'b0110: y = 3'd6;
        4'b1000: y = 3'd7;
        default: y = 3'd0;
      endcase
    end else begin
      unique case (four)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        4'b1110, 4'b0001,
        4'b0111, 4'b1000: y = 3'd7;
        default:          y = 3'd0;
      endcase
    end
  end

  // K23.7/K27.7/K29.7/K30.7: the alternate x.7 after one of these 6-bit codes
  // with the opposite sign (data never uses A7 there).
  assign k_out    = is_k28 || (x_is_kx7 && is_alt7 && !is_k28);
  assign data_out = {y, x};
  assign invalid  = ($countones(data_in) < 4) || ($countones(data_in) > 6);

endmodule
