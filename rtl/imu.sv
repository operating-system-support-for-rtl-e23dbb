// imu - Interface Management Unit: the platform-specific half of a
// virtualised coprocessor interface.
//
// The coprocessor side is portable: the coprocessor names data by object
// number (CP_OBJ) and element index (CP_ADDR), raises CP_ACCESS (with CP_WR
// for a write and CP_DOUT for the write data) and holds the request until
// CP_TLBHIT, in the cycle of which CP_DIN carries the read data. The IMU
// translates {CP_OBJ, upper CP_ADDR bits} through its TLB into a page of the
// dual-port RAM and completes the access there. When no TLB entry matches,
// the access simply never gets CP_TLBHIT: the coprocessor is stalled, the
// FAULT status bit is set and INT_PLD is raised so that the operating system
// can load the missing page, write the TLB and set CR.RESTART, after which
// the same access is translated again.
//
// Timing of a hit (no fault), four rising edges from request to data:
//   cycle 0  CP_ACCESS high                       state IDLE
//   edge 1   request latched into AR              -> LOOKUP
//   edge 2   TLB match registered                 -> MEM (or FAULT)
//   edge 3   dual-port RAM read or write          -> DATA
//   cycle 3  CP_TLBHIT high, CP_DIN valid
//   edge 4   coprocessor takes the data           -> IDLE
// A coprocessor that keeps CP_ACCESS high with the next request after edge
// 4 gets one access every four cycles.
//
// Processor side: a word-addressed register port (see vim_pkg for the map):
// CR (START, RESTART, IRQ_EN, ACK), SR (FAULT, DONE, BUSY, WRITE), AR (the
// object and index of the most recent coprocessor access, {obj, index}), and
// the TLB entries. CR.START produces the one-cycle CP_START pulse; CP_FIN
// from the coprocessor sets DONE. CP_PINV, a one-cycle pulse from the
// coprocessor, invalidates the TLB entries of the parameter-passing object
// once the coprocessor has read its parameters. INT_PLD = IRQ_EN and
// (FAULT or DONE). Reset is synchronous and active high.
//
// CP_DIN is wired straight to the RAM's read data: the RAM's own output
// register is the DATA stage, so no second register is needed. Register
// reads return zero above bit 23 (AR, the widest register, has 24 bits).
//
// From the described design: the signal names, AR/SR/CR and the TLB with
// valid and dirty bits, stalling on a miss with an interrupt, restart by the
// operating system, the parameter page invalidated after use, and the
// four-cycle access. Choices of this design: the register map and bit
// positions, the CP_PINV line used for that invalidation, the
// write-one-pulse control bits, and how the four cycles are split.
module imu
  import vim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // coprocessor side (portable)
  input  logic [OBJ_W-1:0]  cp_obj,
  input  logic [ADDR_W-1:0] cp_addr,
  input  logic [DATA_W-1:0] cp_dout,
  output logic [DATA_W-1:0] cp_din,
  input  logic              cp_access,
  input  logic              cp_wr,
  output logic              cp_tlbhit,
  output logic              cp_start,
  input  logic              cp_fin,
  input  logic              cp_pinv,
  // dual-port RAM side (platform-specific)
  output logic [DP_AW-1:0]  dp_addr,
  input  logic [DATA_W-1:0] dp_din,
  output logic [DATA_W-1:0] dp_dout,
  output logic              dp_en,
  output logic              dp_wr,
  // processor register port
  input  logic              reg_en,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              int_pld
);

  localparam int unsigned IW = $clog2(TLB_ENTRIES);

  imu_state_t state;

  // AR and the latched request
  logic [OBJ_W-1:0]  ar_obj;
  logic [ADDR_W-1:0] ar_addr;
  logic              ar_wr;
  logic [DATA_W-1:0] wdata_q;
  // translation result
  logic [PPN_W-1:0]  ppn_q;
  logic [IW-1:0]     idx_q;
  // status and control
  logic sr_fault, sr_done, sr_busy, cr_irq_en;

  // TLB
  logic              lk_hit;
  logic [IW-1:0]     lk_idx;
  logic [PPN_W-1:0]  lk_ppn;
  tlb_entry_t        tlb_rentry;
  logic              tlb_we;
  logic [IW-1:0]     tlb_idx;

  // processor writes
  logic wr_cr, do_start, do_restart, do_ack;
  assign wr_cr      = reg_en && reg_wr && reg_addr == REG_CR;
  assign do_start   = wr_cr && reg_wdata[CR_START];
  assign do_restart = wr_cr && reg_wdata[CR_RESTART];
  assign do_ack     = wr_cr && reg_wdata[CR_ACK];
  assign tlb_we     = reg_en && reg_wr && reg_addr >= REG_TLB &&
                      reg_addr < REG_TLB + REG_AW'(TLB_ENTRIES);
  assign tlb_idx    = IW'(reg_addr - REG_TLB);

  imu_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk        (clk),
    .rst        (rst),
    .lk_obj     (ar_obj),
    .lk_vpn     (ar_addr[ADDR_W-1:OFF_W]),
    .lk_hit     (lk_hit),
    .lk_idx     (lk_idx),
    .lk_ppn     (lk_ppn),
    .set_dirty  (state == IMU_MEM && ar_wr),
    .dirty_idx  (idx_q),
    .inv_obj_en (cp_pinv),
    .inv_obj    (PARAM_OBJ),
    .cpu_we     (tlb_we),
    .cpu_idx    (tlb_idx),
    .cpu_wentry (tlb_entry_t'(reg_wdata[TLB_ENTRY_W-1:0])),
    .cpu_rentry (tlb_rentry)
  );

  // translation state machine
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IMU_IDLE;
      ar_obj  <= '0;
      ar_addr <= '0;
      ar_wr   <= 1'b0;
      wdata_q <= '0;
      ppn_q   <= '0;
      idx_q   <= '0;
    end else begin
      unique case (state)
        IMU_IDLE:
          if (cp_access) begin
            ar_obj  <= cp_obj;
            ar_addr <= cp_addr;
            ar_wr   <= cp_wr;
            wdata_q <= cp_dout;
            state   <= IMU_LOOKUP;
          end
        IMU_LOOKUP: begin
          ppn_q <= lk_ppn;
          idx_q <= lk_idx;
          state <= lk_hit ? IMU_MEM : IMU_FAULT;
        end
        IMU_MEM:   state <= IMU_DATA;
        IMU_DATA:  state <= IMU_IDLE;
        IMU_FAULT: if (do_restart) state <= IMU_LOOKUP;
        default:   state <= IMU_IDLE;
      endcase
    end
  end

  // status and control registers
  always_ff @(posedge clk) begin
    if (rst) begin
      sr_fault  <= 1'b0;
      sr_done   <= 1'b0;
      sr_busy   <= 1'b0;
      cr_irq_en <= 1'b0;
    end else begin
      if (wr_cr) cr_irq_en <= reg_wdata[CR_IRQ_EN];
      if (state == IMU_LOOKUP && !lk_hit) sr_fault <= 1'b1;
      else if (state == IMU_FAULT && do_restart) sr_fault <= 1'b0;
      if (do_start) begin
        sr_busy <= 1'b1;
        sr_done <= 1'b0;
      end else if (cp_fin) begin
        sr_busy <= 1'b0;
        sr_done <= 1'b1;
      end else if (do_ack) begin
        sr_done <= 1'b0;
      end
    end
  end

  assign cp_start  = do_start;
  assign cp_tlbhit = (state == IMU_DATA);
  assign cp_din    = dp_din;
  assign int_pld   = cr_irq_en && (sr_fault || sr_done);

  assign dp_en     = (state == IMU_MEM);
  assign dp_wr     = (state == IMU_MEM) && ar_wr;
  assign dp_addr   = {ppn_q, ar_addr[OFF_W-1:0]};
  assign dp_dout   = wdata_q;

  // register read
  always_comb begin
    reg_rdata = '0;
    if (reg_addr == REG_CR) begin
      reg_rdata[CR_IRQ_EN] = cr_irq_en;
    end else if (reg_addr == REG_SR) begin
      reg_rdata[SR_FAULT] = sr_fault;
      reg_rdata[SR_DONE]  = sr_done;
      reg_rdata[SR_BUSY]  = sr_busy;
      reg_rdata[SR_WRITE] = ar_wr;
    end else if (reg_addr == REG_AR) begin
      reg_rdata[OBJ_W+ADDR_W-1:0] = {ar_obj, ar_addr};
    end else if (reg_addr >= REG_TLB && reg_addr < REG_TLB + REG_AW'(TLB_ENTRIES)) begin
      reg_rdata[TLB_ENTRY_W-1:0] = tlb_rentry;
    end
  end

  // Handshake rule: a request is held, unchanged, until CP_TLBHIT.
  a_hold_request: assert property (@(posedge clk) disable iff (rst)
    (cp_access && !cp_tlbhit) |=> (cp_access && $stable(cp_obj) && $stable(cp_addr) && $stable(cp_wr)))
    else $error("coprocessor dropped or changed a request before CP_TLBHIT");
  // CP_TLBHIT only answers a request.
  a_hit_has_request: assert property (@(posedge clk) disable iff (rst)
    cp_tlbhit |-> cp_access)
    else $error("CP_TLBHIT without CP_ACCESS");

endmodule
