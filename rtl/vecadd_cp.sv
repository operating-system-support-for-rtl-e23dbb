// vecadd_cp - elementary coprocessor C[i] = A[i] + B[i] written against the
// virtual interface.
//
// The coprocessor knows only object numbers and element indices: A is object
// 0, B object 1, C object 2, and the vector length is the first word of the
// parameter-passing object. It contains no physical address and no notion
// of how large the interface memory is.
//
// Operation: after CP_START it reads the length from the parameter object,
// pulses CP_PINV to release the parameter page, then for i = 0 .. SIZE-1
// reads A[i], reads B[i] and writes A[i] + B[i] (modulo 2^32) to C[i], one
// access at a time, and finally pulses CP_FIN. Every access is a request
// held on CP_ACCESS until the IMU answers with CP_TLBHIT, so a translation
// miss simply stretches the access (the coprocessor is stalled). The next
// request is presented in the cycle after CP_TLBHIT.
//
// From the described design: the three objects and the three-access loop
// body, and reading the parameters from a parameter page that is then
// invalidated. Choices of this design: the state machine around the loop
// (the description leaves it out), 32-bit elements, a length of 0 meaning
// "no work", and a synchronous active-high reset.
module vecadd_cp
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

  localparam logic [OBJ_W-1:0] OBJ_A = OBJ_W'(0);
  localparam logic [OBJ_W-1:0] OBJ_B = OBJ_W'(1);
  localparam logic [OBJ_W-1:0] OBJ_C = OBJ_W'(2);

  typedef enum logic [2:0] {S_IDLE, S_PARAM, S_RD_A, S_RD_B, S_WR_C, S_FIN} st_t;
  st_t st;

  logic [ADDR_W-1:0] reg_i, size;
  logic [DATA_W-1:0] reg_a;

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
      reg_i     <= '0;
      size      <= '0;
      reg_a     <= '0;
    end else begin
      cp_fin  <= 1'b0;
      cp_pinv <= 1'b0;
      unique case (st)
        S_IDLE:
          if (cp_start) begin
            cp_obj    <= PARAM_OBJ;
            cp_addr   <= '0;
            cp_wr     <= 1'b0;
            cp_access <= 1'b1;
            st        <= S_PARAM;
          end
        S_PARAM:
          if (cp_tlbhit) begin
            size    <= cp_din[ADDR_W-1:0];
            cp_pinv <= 1'b1;
            reg_i   <= '0;
            if (cp_din[ADDR_W-1:0] == '0) begin
              cp_access <= 1'b0;
              st        <= S_FIN;
            end else begin
              cp_obj  <= OBJ_A;
              cp_addr <= '0;
              st      <= S_RD_A;
            end
          end
        S_RD_A:
          if (cp_tlbhit) begin
            reg_a  <= cp_din;
            cp_obj <= OBJ_B;
            st     <= S_RD_B;
          end
        S_RD_B:
          if (cp_tlbhit) begin
            cp_obj  <= OBJ_C;
            cp_dout <= reg_a + cp_din;
            cp_wr   <= 1'b1;
            st      <= S_WR_C;
          end
        S_WR_C:
          if (cp_tlbhit) begin
            cp_wr <= 1'b0;
            reg_i <= reg_i + 1'b1;
            if (reg_i + 1'b1 == size) begin
              cp_access <= 1'b0;
              st        <= S_FIN;
            end else begin
              cp_obj  <= OBJ_A;
              cp_addr <= reg_i + 1'b1;
              st      <= S_RD_A;
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
