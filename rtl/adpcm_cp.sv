// adpcm_cp - ADPCM decoding coprocessor ("adpcmdecode") written against the
// virtual interface.
//
// It decodes 4-bit IMA/DVI ADPCM codes into 16-bit PCM samples with the
// classic adaptive-step algorithm: for each code, with the current step
// size s = STEP[index],
//   diff  = s/8 + (b2 ? s : 0) + (b1 ? s/2 : 0) + (b0 ? s/4 : 0)
//   pred  = clamp16(pred -/+ diff)      (minus when the sign bit b3 is set)
//   index = clamp(index + ADJ[b2:b0], 0, 88)
// where ADJ = {-1,-1,-1,-1,2,4,6,8} and STEP is the standard 89-entry table
// (7, 8, 9, ... 32767, each about 1.1 times the one before).
//
// Objects: the number of input words N is the first word of the
// parameter-passing object; object 0 holds the input, 32-bit words of four
// bytes, byte 0 in bits 7:0, each byte two codes, high nibble first; object
// 1 receives the output, 32-bit words of two samples, the earlier one in
// bits 15:0. One input word gives eight samples, four output words, so the
// output is four times the size of the input. Decoder state starts at
// pred = 0, index = 0 for every run.
//
// Operation: after CP_START read N, pulse CP_PINV, then per input word: one
// read, then four times (decode two codes, one per cycle; write one output
// word). Each access is held on CP_ACCESS until CP_TLBHIT, so translation
// misses stall the decoder. CP_FIN pulses when all N words are done.
//
// From the described design: a coprocessor decoding ADPCM whose output is
// four times its input, using the virtual interface. The algorithm, the
// data packing and the parameter layout are this design's own choices, made
// to match the common C reference decoder (nibble order and arithmetic).
module adpcm_cp
  import vim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cp_start,
  output logic [OBJ_W-1:0]  cp_obj,
  output logic [ADDR_W-1:0] cp_addr,
  output logic [DATA_W-1:0] cp_dout,
  input  logic [DATA_W-1:0] cp_din,
  output logic              cp_access,
  output logic              cp_wr,
  input  logic              cp_tlbhit,
  output logic              cp_fin,
  output logic              cp_pinv
);

  localparam logic [OBJ_W-1:0] OBJ_IN  = OBJ_W'(0);
  localparam logic [OBJ_W-1:0] OBJ_OUT = OBJ_W'(1);

  // Standard IMA ADPCM step-size table, 89 entries.
  function automatic logic [14:0] step_size(input logic [6:0] idx);
    unique case (idx)
      7'd0:  step_size = 15'd7;     7'd1:  step_size = 15'd8;
      7'd2:  step_size = 15'd9;     7'd3:  step_size = 15'd10;
      7'd4:  step_size = 15'd11;    7'd5:  step_size = 15'd12;
      7'd6:  step_size = 15'd13;    7'd7:  step_size = 15'd14;
      7'd8:  step_size = 15'd16;    7'd9:  step_size = 15'd17;
      7'd10: step_size = 15'd19;    7'd11: step_size = 15'd21;
      7'd12: step_size = 15'd23;    7'd13: step_size = 15'd25;
      7'd14: step_size = 15'd28;    7'd15: step_size = 15'd31;
      7'd16: step_size = 15'd34;    7'd17: step_size = 15'd37;
      7'd18: step_size = 15'd41;    7'd19: step_size = 15'd45;
      7'd20: step_size = 15'd50;    7'd21: step_size = 15'd55;
      7'd22: step_size = 15'd60;    7'd23: step_size = 15'd66;
      7'd24: step_size = 15'd73;    7'd25: step_size = 15'd80;
      7'd26: step_size = 15'd88;    7'd27: step_size = 15'd97;
      7'd28: step_size = 15'd107;   7'd29: step_size = 15'd118;
      7'd30: step_size = 15'd130;   7'd31: step_size = 15'd143;
      7'd32: step_size = 15'd157;   7'd33: step_size = 15'd173;
      7'd34: step_size = 15'd190;   7'd35: step_size = 15'd209;
      7'd36: step_size = 15'd230;   7'd37: step_size = 15'd253;
      7'd38: step_size = 15'd279;   7'd39: step_size = 15'd307;
      7'd40: step_size = 15'd337;   7'd41: step_size = 15'd371;
      7'd42: step_size = 15'd408;   7'd43: step_size = 15'd449;
      7'd44: step_size = 15'd494;   7'd45: step_size = 15'd544;
      7'd46: step_size = 15'd598;   7'd47: step_size = 15'd658;
      7'd48: step_size = 15'd724;   7'd49: step_size = 15'd796;
      7'd50: step_size = 15'd876;   7'd51: step_size = 15'd963;
      7'd52: step_size = 15'd1060;  7'd53: step_size = 15'd1166;
      7'd54: step_size = 15'd1282;  7'd55: step_size = 15'd1411;
      7'd56: step_size = 15'd1552;  7'd57: step_size = 15'd1707;
      7'd58: step_size = 15'd1878;  7'd59: step_size = 15'd2066;
      7'd60: step_size = 15'd2272;  7'd61: step_size = 15'd2499;
      7'd62: step_size = 15'd2749;  7'd63: step_size = 15'd3024;
      7'd64: step_size = 15'd3327;  7'd65: step_size = 15'd3660;
      7'd66: step_size = 15'd4026;  7'd67: step_size = 15'd4428;
      7'd68: step_size = 15'd4871;  7'd69: step_size = 15'd5358;
      7'd70: step_size = 15'd5894;  7'd71: step_size = 15'd6484;
      7'd72: step_size = 15'd7132;  7'd73: step_size = 15'd7845;
      7'd74: step_size = 15'd8630;  7'd75: step_size = 15'd9493;
      7'd76: step_size = 15'd10442; 7'd77: step_size = 15'd11487;
      7'd78: step_size = 15'd12635; 7'd79: step_size = 15'd13899;
      7'd80: step_size = 15'd15289; 7'd81: step_size = 15'd16818;
      7'd82: step_size = 15'd18500; 7'd83: step_size = 15'd20350;
      7'd84: step_size = 15'd22385; 7'd85: step_size = 15'd24623;
      7'd86: step_size = 15'd27086; 7'd87: step_size = 15'd29794;
      default: step_size = 15'd32767;
    endcase
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_PARAM, S_RD, S_DEC0, S_DEC1, S_WR, S_FIN} st_t;
  st_t st;

  logic [ADDR_W-1:0]  n_words, wi;
  logic [1:0]         k;          // output word within the input word
  logic [DATA_W-1:0]  inword;
  logic signed [15:0] pred, samp0;
  logic [6:0]         index;

  // one decoding step, combinational
  logic [3:0]         code;
  logic [14:0]        step;
  logic [16:0]        diff;
  logic signed [17:0] sum;
  logic signed [15:0] pred_next;
  logic signed [7:0]  idx_sum;
  logic [6:0]         index_next;

  always_comb begin
    // code 2k (high nibble of byte k) in S_DEC0, code 2k+1 (low nibble) in S_DEC1
    code = (st == S_DEC0) ? inword[8*k + 4 +: 4] : inword[8*k +: 4];
    step = step_size(index);
    diff = 17'(step >> 3);
    if (code[2]) diff = diff + 17'(step);
    if (code[1]) diff = diff + 17'(step >> 1);
    if (code[0]) diff = diff + 17'(step >> 2);
    sum = code[3] ? 18'(pred) - 18'(diff) : 18'(pred) + 18'(diff);
    if (sum > 18'sd32767)       pred_next = 16'sd32767;
    else if (sum < -18'sd32768) pred_next = -16'sd32768;
    else                        pred_next = sum[15:0];
    unique case (code[2:0])
      3'd4:    idx_sum = 8'($signed({1'b0, index})) + 8'sd2;
      3'd5:    idx_sum = 8'($signed({1'b0, index})) + 8'sd4;
      3'd6:    idx_sum = 8'($signed({1'b0, index})) + 8'sd6;
      3'd7:    idx_sum = 8'($signed({1'b0, index})) + 8'sd8;
      default: idx_sum = 8'($signed({1'b0, index})) - 8'sd1;
    endcase
    if (idx_sum < 0)        index_next = 7'd0;
    else if (idx_sum > 88)  index_next = 7'd88;
    else                    index_next = idx_sum[6:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      cp_obj    <= '0;
      cp_addr   <= '0;
      cp_dout   <= '0;
      cp_access <= 1'b0;
      cp_wr     <= 1'b0;
      cp_fin    <= 1'b0;
      cp_pinv   <= 1'b0;
      n_words   <= '0;
      wi        <= '0;
      k         <= '0;
      inword    <= '0;
      pred      <= '0;
      samp0     <= '0;
      index     <= '0;
    end else begin
      cp_fin  <= 1'b0;
      cp_pinv <= 1'b0;
      unique case (st)
        S_IDLE:
          if (cp_start) begin
            pred      <= '0;
            index     <= '0;
            cp_obj    <= PARAM_OBJ;
            cp_addr   <= '0;
            cp_wr     <= 1'b0;
            cp_access <= 1'b1;
            st        <= S_PARAM;
          end
        S_PARAM:
          if (cp_tlbhit) begin
            n_words <= cp_din[ADDR_W-1:0];
            cp_pinv <= 1'b1;
            wi      <= '0;
            if (cp_din[ADDR_W-1:0] == '0) begin
              cp_access <= 1'b0;
              st        <= S_FIN;
            end else begin
              cp_obj  <= OBJ_IN;
              cp_addr <= '0;
              st      <= S_RD;
            end
          end
        S_RD:
          if (cp_tlbhit) begin
            inword    <= cp_din;
            k         <= '0;
            cp_access <= 1'b0;
            st        <= S_DEC0;
          end
        S_DEC0: begin
          samp0 <= pred_next;
          pred  <= pred_next;
          index <= index_next;
          st    <= S_DEC1;
        end
        S_DEC1: begin
          pred      <= pred_next;
          index     <= index_next;
          cp_obj    <= OBJ_OUT;
          cp_addr   <= {wi[ADDR_W-3:0], k};
          cp_dout   <= {pred_next, samp0};
          cp_wr     <= 1'b1;
          cp_access <= 1'b1;
          st        <= S_WR;
        end
        S_WR:
          if (cp_tlbhit) begin
            cp_wr     <= 1'b0;
            cp_access <= 1'b0;
            if (k != 2'd3) begin
              k  <= k + 1'b1;
              st <= S_DEC0;
            end else if (wi + 1'b1 == n_words) begin
              st <= S_FIN;
            end else begin
              wi        <= wi + 1'b1;
              cp_obj    <= OBJ_IN;
              cp_addr   <= wi + 1'b1;
              cp_access <= 1'b1;
              st        <= S_RD;
            end
          end
        S_FIN: begin
          cp_fin <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
