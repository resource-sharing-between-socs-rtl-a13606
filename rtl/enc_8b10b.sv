`timescale 1ns / 1ps
// enc_8b10b: combinational 8b/10b encoder (IBM code) with disparity in/out.
//
// The byte is split into its low five bits (EDCBA) and its top three bits
// (HGF). A 5b/6b table and a 3b/4b table give the code of each part in the
// form used when the running disparity is negative; the disparity control
// picks, for each part, either that form or its complement so that codes
// with an unequal number of ones and zeros alternate in sign. The two parts
// are concatenated into Symbol Out = {a,b,c,d,e,i,f,g,h,j}, bit 9 being the
// first bit sent. This structure (two sub-encoders, disparity control,
// encoding switches, Disparity In/Out for cascading) follows the documented
// encoder diagram; the tables are the standard 8b/10b code.
//
// Control characters (k_in = 1) supported: K28.0..K28.7, K23.7, K27.7, K29.7
// and K30.7. For any other byte with k_in = 1 the data code is sent.
//
// Interface: disp_in = 1 means the running disparity before this character
// is positive; disp_out is the running disparity after it. No clock: the
// caller registers the symbol and the disparity.
module enc_8b10b (
  input  logic [7:0] data_in,
  input  logic       k_in,
  input  logic       disp_in,
  output logic [9:0] data_out,
  output logic       disp_out
);

  logic [4:0] x;       // EDCBA
  logic [2:0] y;       // HGF
  logic       k28, kx7;
  logic [5:0] six_neg, six;
  logic [3:0] four_neg, four;
  logic       rd_mid;
  logic       six_paired, four_paired, use_a7;

  assign x = data_in[4:0];
  assign y = data_in[7:5];
  assign k28 = k_in && (x == 5'd28);
  assign kx7 = k_in && (y == 3'd7) &&
               ((x == 5'd23) || (x == 5'd27) || (x == 5'd29) || (x == 5'd30));

  // 5b/6b encoder: abcdei for negative running disparity
  always_comb begin
    unique case (x)
      5'd0:  six_neg = 6'b100111;
      5'd1:  six_neg = 6'b011101;
      5'd2:  six_neg = 6'b101101;
      5'd3:  six_neg = 6'b110001;
      5'd4:  six_neg = 6'b110101;
      5'd5:  six_neg = 6'b101001;
      5'd6:  six_neg = 6'b011001;
      5'd7:  six_neg = 6'b111000;
      5'd8:  six_neg = 6'b111001;
      5'd9:  six_neg = 6'b100101;
      5'd10: six_neg = 6'b010101;
      5'd11: six_neg = 6'b110100;
      5'd12: six_neg = 6'b001101;
      5'd13: six_neg = 6'b101100;
      5'd14: six_neg = 6'b011100;
      5'd15: six_neg = 6'b010111;
      5'd16: six_neg = 6'b011011;
      5'd17: six_neg = 6'b100011;
      5'd18: six_neg = 6'b010011;
      5'd19: six_neg = 6'b110010;
      5'd20: six_neg = 6'b001011;
      5'd21: six_neg = 6'b101010;
      5'd22: six_neg = 6'b011010;
      5'd23: six_neg = 6'b111010;
      5'd24: six_neg = 6'b110011;
      5'd25: six_neg = 6'b100110;
      5'd26: six_neg = 6'b010110;
      5'd27: six_neg = 6'b110110;
      5'd28: six_neg = k28 ? 6'b001111 : 6'b001110;
      5'd29: six_neg = 6'b101110;
      5'd30: six_neg = 6'b011110;
      default: six_neg = 6'b101011;  // 31
    endcase
  end

  // Disparity control, 6-bit part: unbalanced codes and D.07 come in pairs
  assign six_paired = ($countones(six_neg) != 3) || (x == 5'd7);
  assign six        = (disp_in && six_paired) ? ~six_neg : six_neg;
  assign rd_mid     = ($countones(six) != 3) ? ~disp_in : disp_in;

  // x.A7 replaces x.P7 where P7 would make a run of five equal bits
  assign use_a7 = kx7 || k28 ||
                  (!rd_mid && ((x == 5'd17) || (x == 5'd18) || (x == 5'd20))) ||
                  ( rd_mid && ((x == 5'd11) || (x == 5'd13) || (x == 5'd14)));

  // 3b/4b encoder: fghj for negative running disparity
  always_comb begin
    unique case (y)
      3'd0: four_neg = 4'b1011;
      3'd1: four_neg = 4'b1001;
      3'd2: four_neg = 4'b0101;
      3'd3: four_neg = 4'b1100;
      3'd4: four_neg = 4'b1101;
      3'd5: four_neg = 4'b1010;
      3'd6: four_neg = 4'b0110;
      default: four_neg = use_a7 ? 4'b0111 : 4'b1110;
    endcase
  end

  // Disparity control, 4-bit part. For K28.y the whole 4-bit code follows
  // the disparity before the character, so that the comma stays intact.
  assign four_paired = ($countones(four_neg) != 2) || (y == 3'd3);
  always_comb begin
    if (k28) begin
      four = (four_paired) ? ~four_neg : four_neg;  // form after an RD+ 6b
      if (disp_in) four = ~four;
    end else begin
      four = (rd_mid && four_paired) ? ~four_neg : four_neg;
    end
  end

  assign disp_out = ($countones(four) != 2) ? ~rd_mid : rd_mid;
  assign data_out = {six, four};

endmodule
