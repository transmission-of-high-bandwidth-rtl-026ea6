// dec_8b10b: PCS decoder of one receive lane (10b/8b).
//
// Each clock with 'en' the 10-bit symbol (code[9] = bit 'a', first on the
// line) is decoded into an 8-bit value and the control flag k, registered.
// The 6-bit and 4-bit sub-blocks are looked up independently of polarity.
// After K28 (001111 / 110000) the balanced 4-bit codes are read in the
// polarity of the 6-bit block, which tells K28.1 from K28.6 and K28.2 from
// K28.5. The A7 code 0111 / 1000 after x = 23, 27, 29 or 30 is a control
// character. code_err flags a symbol that is not in the tables; disp_err
// flags a sub-block whose disparity has the wrong sign for the running
// disparity, which the decoder tracks from the received symbols.
// The document specifies the 10/8 decoder and its 8-bit + 1-bit control
// output; the tables are the standard ones.
module dec_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] code,
  output logic       k,
  output logic [7:0] dout,
  output logic       code_err,
  output logic       disp_err
);
  logic [5:0] c6;
  logic [3:0] c4, c4n;
  logic [4:0] x;
  logic [2:0] y;
  logic       bad6, bad4, k28, kx, rd, rd_mid, rd_next, derr;

  always_comb begin
    c6 = code[9:4];
    c4 = code[3:0];
    bad6 = 1'b0;
    k28  = 1'b0;
    case (c6)
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
      6'b001110:            x = 5'd28;
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      6'b001111, 6'b110000: begin x = 5'd28; k28 = 1'b1; end
      default:              begin x = 5'd0;  bad6 = 1'b1; end
    endcase

    c4n  = (c6 == 6'b110000) ? ~c4 : c4;
    bad4 = 1'b0;
    case (c4n)
      4'b1011, 4'b0100: y = 3'd0;
      4'b1001:          y = 3'd1;
      4'b0101:          y = 3'd2;
      4'b1100, 4'b0011: y = 3'd3;
      4'b1101, 4'b0010: y = 3'd4;
      4'b1010:          y = 3'd5;
      4'b0110:          y = 3'd6;
      4'b1110, 4'b0001,
      4'b0111, 4'b1000: y = 3'd7;
      default:          begin y = 3'd0; bad4 = 1'b1; end
    endcase
    kx = k28 || ((c4 == 4'b0111 || c4 == 4'b1000) &&
                 (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));

    // running disparity check, sub-block by sub-block
    derr = 1'b0;
    rd_mid = rd;
    if ($countones(c6) == 4)      begin derr = rd;  rd_mid = 1'b1; end
    else if ($countones(c6) == 2) begin derr = !rd; rd_mid = 1'b0; end
    rd_next = rd_mid;
    if ($countones(c4) == 3)      begin derr = derr | rd_mid;  rd_next = 1'b1; end
    else if ($countones(c4) == 1) begin derr = derr | !rd_mid; rd_next = 1'b0; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= 1'b1; dout <= 8'hBC; code_err <= 1'b0; disp_err <= 1'b0; rd <= 1'b0;
    end else if (en) begin
      k        <= kx;
      dout     <= {y, x};
      code_err <= bad6 || bad4;
      disp_err <= derr;
      rd       <= rd_next;
    end
  end
endmodule
