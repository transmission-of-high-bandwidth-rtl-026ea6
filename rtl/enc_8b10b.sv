// enc_8b10b: PCS encoder of one transmit lane (8b/10b line code).
//
// Each clock with 'en' the character {k, din} is coded into a 10-bit symbol,
// registered on 'code'. The low five bits (EDCBA) map to a 6-bit sub-block
// abcdei and the top three (HGF) to a 4-bit sub-block fghj, using the
// standard 8b/10b tables with running disparity: an unbalanced sub-block is
// sent in the polarity that brings the disparity back, and the balanced
// 111000 / 1100 codes alternate with it as well. code[9] is bit 'a', the
// first bit on the line. Valid control characters are K28.0-K28.7, K23.7,
// K27.7, K29.7 and K30.7. Running disparity starts negative after reset.
// The document specifies an 8/10 encoder in the PCS; the tables are the
// standard ones.
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] din,
  output logic [9:0] code,
  output logic       rd         // running disparity after 'code' (1 = positive)
);
  function automatic logic [5:0] tbl6(input logic [4:0] x);
    case (x)
      5'd0:  tbl6 = 6'b100111;  5'd1:  tbl6 = 6'b011101;
      5'd2:  tbl6 = 6'b101101;  5'd3:  tbl6 = 6'b110001;
      5'd4:  tbl6 = 6'b110101;  5'd5:  tbl6 = 6'b101001;
      5'd6:  tbl6 = 6'b011001;  5'd7:  tbl6 = 6'b111000;
      5'd8:  tbl6 = 6'b111001;  5'd9:  tbl6 = 6'b100101;
      5'd10: tbl6 = 6'b010101;  5'd11: tbl6 = 6'b110100;
      5'd12: tbl6 = 6'b001101;  5'd13: tbl6 = 6'b101100;
      5'd14: tbl6 = 6'b011100;  5'd15: tbl6 = 6'b010111;
      5'd16: tbl6 = 6'b011011;  5'd17: tbl6 = 6'b100011;
      5'd18: tbl6 = 6'b010011;  5'd19: tbl6 = 6'b110010;
      5'd20: tbl6 = 6'b001011;  5'd21: tbl6 = 6'b101010;
      5'd22: tbl6 = 6'b011010;  5'd23: tbl6 = 6'b111010;
      5'd24: tbl6 = 6'b110011;  5'd25: tbl6 = 6'b100110;
      5'd26: tbl6 = 6'b010110;  5'd27: tbl6 = 6'b110110;
      5'd28: tbl6 = 6'b001110;  5'd29: tbl6 = 6'b101110;
      5'd30: tbl6 = 6'b011110;  default: tbl6 = 6'b101011;
    endcase
  endfunction

  // 4-bit sub-block for negative running disparity (data characters).
  function automatic logic [3:0] tbl4(input logic [2:0] y);
    case (y)
      3'd0: tbl4 = 4'b1011;  3'd1: tbl4 = 4'b1001;
      3'd2: tbl4 = 4'b0101;  3'd3: tbl4 = 4'b1100;
      3'd4: tbl4 = 4'b1101;  3'd5: tbl4 = 4'b1010;
      3'd6: tbl4 = 4'b0110;  default: tbl4 = 4'b1110;
    endcase
  endfunction

  function automatic logic unbal6(input logic [5:0] c);
    unbal6 = ($countones(c) != 3);
  endfunction

  logic [4:0] x;
  logic [2:0] y;
  logic       k28, use_a7, rd_mid, flip4;
  logic [5:0] c6n, c6;
  logic [3:0] c4n, c4;

  always_comb begin
    x   = din[4:0];
    y   = din[7:5];
    k28 = k && (x == 5'd28);
    c6n = k28 ? 6'b001111 : tbl6(x);
    c6  = (rd && (unbal6(c6n) || c6n == 6'b111000)) ? ~c6n : c6n;
    rd_mid = unbal6(c6n) ? !rd : rd;

    use_a7 = (y == 3'd7) &&
             (k || (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                   ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    if (use_a7)     c4n = 4'b0111;
    else if (k)     c4n = (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6) ? ~tbl4(y) : tbl4(y);
    else            c4n = tbl4(y);
    // unbalanced sub-blocks and the alternating x.3 code follow the disparity;
    // the balanced control codes K28.1/.2/.5/.6 do as well
    flip4 = rd_mid && (($countones(c4n) != 2) || y == 3'd3 ||
                       (k && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6)));
    c4 = flip4 ? ~c4n : c4n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= 10'b0011111010;    // K28.5, negative disparity
      rd   <= 1'b0;
    end else if (en) begin
      code <= {c6, c4};
      rd   <= ($countones(c4n) != 2) ? !rd_mid : rd_mid;
    end
  end
endmodule
