// vim_soc - the reconfigurable-logic side of a system with a virtualised
// coprocessor interface: IMU, dual-port interface RAM and the coprocessors.
//
// A coprocessor addresses its data only as (object, index). The IMU
// translates each access through its TLB to a page of the 16 KB dual-port
// RAM, and on a miss stalls the coprocessor and raises INT_PLD. The
// processor (with its operating system) is outside this module: it reaches
// the IMU registers through the reg_* port and the second port of the
// dual-port RAM through the cpu_dp_* port. Its interface manager loads and
// evicts pages, writes TLB entries, restarts stalled translations and, on
// end of operation, copies dirty pages back to user memory.
//
// Several coprocessors are built in; cp_sel chooses the one that is
// "loaded" (it stands for loading a configuration into the reconfigurable
// logic): only that one gets CP_START and only its requests reach the IMU.
//   cp_sel = 0: vector addition C[i] = A[i] + B[i]
//   cp_sel = 1: ADPCM decoder
//   cp_sel = 2: IDEA encryption
// Any other value loads no coprocessor.
// cp_sel must not change while a coprocessor runs.
//
// Single clock, synchronous active-high reset. The composition (IMU between
// coprocessor and dual-port RAM, processor on the RAM's other port and on the
// IMU registers, interrupt line INT_PLD) follows the described system; the
// selection port is this design's own stand-in for reconfiguration.
module vim_soc
  import vim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        cp_sel,
  // processor access to IMU registers
  input  logic              reg_en,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              int_pld,
  // processor access to the dual-port RAM
  input  logic              cpu_dp_en,
  input  logic              cpu_dp_wr,
  input  logic [DP_AW-1:0]  cpu_dp_addr,
  input  logic [DATA_W-1:0] cpu_dp_din,
  output logic [DATA_W-1:0] cpu_dp_dout
);

  localparam int unsigned NCP = 3;

  // IMU <-> selected coprocessor
  logic [OBJ_W-1:0]  cp_obj;
  logic [ADDR_W-1:0] cp_addr;
  logic [DATA_W-1:0] cp_dout, cp_din;
  logic              cp_access, cp_wr, cp_tlbhit, cp_start, cp_fin, cp_pinv;

  // per-coprocessor outputs
  logic [OBJ_W-1:0]  c_obj    [NCP];
  logic [ADDR_W-1:0] c_addr   [NCP];
  logic [DATA_W-1:0] c_dout   [NCP];
  logic              c_access [NCP];
  logic              c_wr     [NCP];
  logic              c_fin    [NCP];
  logic              c_pinv   [NCP];
  logic [NCP-1:0]    c_sel;

  // IMU <-> RAM
  logic [DP_AW-1:0]  dp_addr;
  logic [DATA_W-1:0] dp_rdata, dp_wdata;
  logic              dp_en, dp_wr;

  imu u_imu (
    .clk       (clk),
    .rst       (rst),
    .cp_obj    (cp_obj),
    .cp_addr   (cp_addr),
    .cp_dout   (cp_dout),
    .cp_din    (cp_din),
    .cp_access (cp_access),
    .cp_wr     (cp_wr),
    .cp_tlbhit (cp_tlbhit),
    .cp_start  (cp_start),
    .cp_fin    (cp_fin),
    .cp_pinv   (cp_pinv),
    .dp_addr   (dp_addr),
    .dp_din    (dp_rdata),
    .dp_dout   (dp_wdata),
    .dp_en     (dp_en),
    .dp_wr     (dp_wr),
    .reg_en    (reg_en),
    .reg_wr    (reg_wr),
    .reg_addr  (reg_addr),
    .reg_wdata (reg_wdata),
    .reg_rdata (reg_rdata),
    .int_pld   (int_pld)
  );

  dp_ram u_dp_ram (
    .clk    (clk),
    .a_en   (dp_en),
    .a_wr   (dp_wr),
    .a_addr (dp_addr),
    .a_din  (dp_wdata),
    .a_dout (dp_rdata),
    .b_en   (cpu_dp_en),
    .b_wr   (cpu_dp_wr),
    .b_addr (cpu_dp_addr),
    .b_din  (cpu_dp_din),
    .b_dout (cpu_dp_dout)
  );

  always_comb begin
    for (int i = 0; i < NCP; i++) c_sel[i] = (cp_sel == 2'(i));
  end

  vecadd_cp u_vecadd (
    .clk       (clk),
    .rst       (rst),
    .cp_start  (cp_start && c_sel[0]),
    .cp_obj    (c_obj[0]),
    .cp_addr   (c_addr[0]),
    .cp_dout   (c_dout[0]),
    .cp_din    (cp_din),
    .cp_access (c_access[0]),
    .cp_wr     (c_wr[0]),
    .cp_tlbhit (cp_tlbhit && c_sel[0]),
    .cp_fin    (c_fin[0]),
    .cp_pinv   (c_pinv[0])
  );

  adpcm_cp u_adpcm (
    .clk       (clk),
    .rst       (rst),
    .cp_start  (cp_start && c_sel[1]),
    .cp_obj    (c_obj[1]),
    .cp_addr   (c_addr[1]),
    .cp_dout   (c_dout[1]),
    .cp_din    (cp_din),
    .cp_access (c_access[1]),
    .cp_wr     (c_wr[1]),
    .cp_tlbhit (cp_tlbhit && c_sel[1]),
    .cp_fin    (c_fin[1]),
    .cp_pinv   (c_pinv[1])
  );

  idea_cp u_idea (
    .clk       (clk),
    .rst       (rst),
    .cp_start  (cp_start && c_sel[2]),
    .cp_obj    (c_obj[2]),
    .cp_addr   (c_addr[2]),
    .cp_dout   (c_dout[2]),
    .cp_din    (cp_din),
    .cp_access (c_access[2]),
    .cp_wr     (c_wr[2]),
    .cp_tlbhit (cp_tlbhit && c_sel[2]),
    .cp_fin    (c_fin[2]),
    .cp_pinv   (c_pinv[2])
  );

  // requests of the loaded coprocessor only
  always_comb begin
    cp_obj    = '0;
    cp_addr   = '0;
    cp_dout   = '0;
    cp_access = 1'b0;
    cp_wr     = 1'b0;
    cp_fin    = 1'b0;
    cp_pinv   = 1'b0;
    for (int i = 0; i < NCP; i++) begin
      if (c_sel[i]) begin
        cp_obj    = c_obj[i];
        cp_addr   = c_addr[i];
        cp_dout   = c_dout[i];
        cp_access = c_access[i];
        cp_wr     = c_wr[i];
        cp_fin    = c_fin[i];
        cp_pinv   = c_pinv[i];
      end
    end
  end

endmodule
