// pimca_ctrl -- instruction memory, fetch and decode of the PIMCA accelerator.
//
// The program is a list of instr_t words (see pimca_pkg) loaded through im_we.
// After start the controller fetches one instruction per cycle (IF, registered
// instruction memory read) and decodes it (ID) into a micro-operation uop for
// the LD / IMC / SIMD / WB stages that follow in pimca_top.
//  * A regular instruction carries a 6-bit repeat field: it is issued rep+1 times
//    on consecutive cycles while fetch is held; the read and write addresses grow
//    by one on each repetition (horizontal sliding along a feature-map row).
//  * Loop-setup (LS) loads the loop register and counter of nesting level lvl
//    (up to eight levels) with an iteration count and per-iteration read/write
//    address strides. Loop-end (LE) decrements the counter and jumps back to
//    ltarget while iterations remain, adding the strides to that level's address
//    offsets; when the loop is done the offsets of that level are cleared. The
//    offsets of all levels are added to every regular instruction's addresses.
//    A taken jump costs one bubble cycle.
//  * HALT ends the program (done pulses, busy falls).
// Repeat and nested-loop support follow the accelerator's ISA; the per-level
// address strides, the one-cycle jump bubble and the load port are this
// implementation's choices. There is no hazard detection: a program reads one
// activation-memory group while writing the other.
module pimca_ctrl
  import pimca_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            im_we,
  input  logic [PW-1:0]   im_addr,
  input  instr_t          im_data,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output uop_t            uop,
  // event strobes (for monitoring)
  output logic            ev_repeat,
  output logic            ev_loop_jump
);
  instr_t imem [IMEM_DEPTH];
  always_ff @(posedge clk) if (im_we) imem[im_addr] <= im_data;

  logic [PW-1:0]   pc;
  logic            if_valid;
  instr_t          if_instr;
  logic [5:0]      rep_cnt;
  logic [15:0]     lc   [LOOP_LEVELS];
  logic [AW-1:0]   rstr [LOOP_LEVELS];
  logic [AW-1:0]   wstr [LOOP_LEVELS];
  logic [AW-1:0]   roff [LOOP_LEVELS];
  logic [AW-1:0]   woff [LOOP_LEVELS];
  logic [AW-1:0]   roff_sum, woff_sum;

  always_comb begin
    roff_sum = '0; woff_sum = '0;
    for (int l = 0; l < LOOP_LEVELS; l++) begin
      roff_sum += roff[l];
      woff_sum += woff[l];
    end
  end

  // decode-stage decisions
  logic hold, redirect, halt;
  always_comb begin
    hold = 1'b0; redirect = 1'b0; halt = 1'b0;
    if (busy && if_valid) begin
      unique case (if_instr.itype)
        I_REG:  hold = (rep_cnt != if_instr.rep);
        I_LE:   redirect = (lc[if_instr.lvl] > 16'd1);
        I_HALT: halt = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; if_valid <= 1'b0; busy <= 1'b0; done <= 1'b0; rep_cnt <= '0;
      uop <= '0; ev_repeat <= 1'b0; ev_loop_jump <= 1'b0;
      if_instr <= '0;
      for (int l = 0; l < LOOP_LEVELS; l++) begin
        lc[l] <= '0; rstr[l] <= '0; wstr[l] <= '0; roff[l] <= '0; woff[l] <= '0;
      end
    end else begin
      done <= 1'b0; ev_repeat <= 1'b0; ev_loop_jump <= 1'b0;
      uop <= '0;
      if (start && !busy) begin
        busy <= 1'b1; pc <= '0; if_valid <= 1'b0; rep_cnt <= '0;
        for (int l = 0; l < LOOP_LEVELS; l++) begin roff[l] <= '0; woff[l] <= '0; end
      end else if (busy) begin
        // ---- ID ----
        if (if_valid) begin
          unique case (if_instr.itype)
            I_REG: begin
              uop.valid    <= 1'b1;
              uop.rd_en    <= if_instr.rd_en;
              uop.rd_grp   <= if_instr.rd_grp;
              uop.rd_addr  <= if_instr.rd_addr + roff_sum + AW'(rep_cnt);
              uop.rd_rot   <= if_instr.rd_rot;
              uop.rd_pitch <= if_instr.rd_pitch;
              uop.wr_en    <= if_instr.wr_en;
              uop.wr_addr  <= if_instr.wr_addr + woff_sum + AW'(rep_cnt);
              uop.wr_pair  <= if_instr.wr_pair;
              uop.wr_half  <= if_instr.wr_half;
              uop.pe_en    <= if_instr.pe_en;
              uop.pe_sel   <= if_instr.pe_sel;
              uop.macro_en <= if_instr.macro_en;
              uop.acc18    <= if_instr.acc18;
              uop.in_shift <= if_instr.in_shift;
              uop.simd_en  <= if_instr.simd_en;
              uop.op       <= if_instr.op;
              uop.xsel     <= if_instr.xsel;
              uop.ysel     <= if_instr.ysel;
              uop.zsel     <= if_instr.zsel;
              uop.imm      <= if_instr.imm;
              if (hold) begin rep_cnt <= rep_cnt + 6'd1; ev_repeat <= 1'b1; end
              else rep_cnt <= '0;
            end
            I_LS: begin
              lc[if_instr.lvl]   <= if_instr.lcount;
              rstr[if_instr.lvl] <= if_instr.rd_stride;
              wstr[if_instr.lvl] <= if_instr.wr_stride;
              roff[if_instr.lvl] <= '0;
              woff[if_instr.lvl] <= '0;
            end
            I_LE: begin
              if (redirect) begin
                lc[if_instr.lvl]   <= lc[if_instr.lvl] - 16'd1;
                roff[if_instr.lvl] <= roff[if_instr.lvl] + rstr[if_instr.lvl];
                woff[if_instr.lvl] <= woff[if_instr.lvl] + wstr[if_instr.lvl];
                ev_loop_jump <= 1'b1;
              end else begin
                roff[if_instr.lvl] <= '0;
                woff[if_instr.lvl] <= '0;
              end
            end
            default: begin
              busy <= 1'b0; done <= 1'b1;
            end
          endcase
        end
        // ---- IF ----
        if (halt) begin
          if_valid <= 1'b0;
        end else if (redirect) begin
          pc <= if_instr.ltarget; if_valid <= 1'b0;
        end else if (!hold) begin
          if_instr <= imem[pc]; if_valid <= 1'b1; pc <= pc + 1'b1;
        end
      end
    end
  end
endmodule
