// y86_top: the two pipelined processors of this library, side by side.
//
// p4_* : the four-stage addq-only pipeline (y86_addq_pipe) with forwarding
//        from execute and writeback.
// p6_* : the six-stage addq-only pipeline (y86_addq_pipe6) whose execute
//        step is split over two stages, with a one-cycle stall for a
//        back-to-back dependency.
// p5_* : the five-stage Y86-64 pipeline (y86_pipe) with forwarding,
//        load/use stalling, predict-taken jXX with squashing, and ret
//        stalling.
// The three share only clock and reset and do not interact; each has its own
// memory, loader port, debug ports and event outputs, described in its own
// module.  rst is synchronous and active high.  Putting both in one top is
// a packaging choice of this design.
module y86_top
  import y86_pkg::*;
#(
  parameter int unsigned P4_MEM_BYTES = 4096,
  parameter int unsigned P6_MEM_BYTES = 4096,
  parameter int unsigned P5_MEM_BYTES = 4096
) (
  input  logic       clk,
  input  logic       rst,
  // four-stage addq pipeline
  input  logic       p4_ld_we,
  input  word_t      p4_ld_addr,
  input  logic [7:0] p4_ld_data,
  input  logic       p4_rf_ld_we,
  input  reg_id_t    p4_rf_ld_reg,
  input  word_t      p4_rf_ld_val,
  input  reg_id_t    p4_dbg_reg,
  output word_t      p4_dbg_regval,
  output word_t      p4_pc,
  output logic       p4_retire,
  output logic       p4_ev_fwd_e,
  output logic       p4_ev_fwd_w,
  // six-stage addq pipeline
  input  logic       p6_ld_we,
  input  word_t      p6_ld_addr,
  input  logic [7:0] p6_ld_data,
  input  logic       p6_rf_ld_we,
  input  reg_id_t    p6_rf_ld_reg,
  input  word_t      p6_rf_ld_val,
  input  reg_id_t    p6_dbg_reg,
  output word_t      p6_dbg_regval,
  output word_t      p6_pc,
  output logic       p6_retire,
  output logic       p6_ev_stall,
  output logic       p6_ev_fwd,
  // five-stage Y86-64 pipeline
  input  logic       p5_ld_we,
  input  word_t      p5_ld_addr,
  input  logic [7:0] p5_ld_data,
  input  reg_id_t    p5_dbg_reg,
  output word_t      p5_dbg_regval,
  input  word_t      p5_dbg_addr,
  output word_t      p5_dbg_memval,
  output stat_t      p5_stat,
  output logic       p5_retire,
  output logic       p5_ev_load_use,
  output logic       p5_ev_mispredict,
  output logic       p5_ev_ret_stall,
  output logic       p5_ev_fwd
);

  y86_addq_pipe #(.MEM_BYTES(P4_MEM_BYTES)) u_p4 (
    .clk, .rst,
    .ld_we(p4_ld_we), .ld_addr(p4_ld_addr), .ld_data(p4_ld_data),
    .rf_ld_we(p4_rf_ld_we), .rf_ld_reg(p4_rf_ld_reg), .rf_ld_val(p4_rf_ld_val),
    .dbg_reg(p4_dbg_reg), .dbg_regval(p4_dbg_regval),
    .pc(p4_pc), .retire(p4_retire), .ev_fwd_e(p4_ev_fwd_e), .ev_fwd_w(p4_ev_fwd_w)
  );

  y86_addq_pipe6 #(.MEM_BYTES(P6_MEM_BYTES)) u_p6 (
    .clk, .rst,
    .ld_we(p6_ld_we), .ld_addr(p6_ld_addr), .ld_data(p6_ld_data),
    .rf_ld_we(p6_rf_ld_we), .rf_ld_reg(p6_rf_ld_reg), .rf_ld_val(p6_rf_ld_val),
    .dbg_reg(p6_dbg_reg), .dbg_regval(p6_dbg_regval),
    .pc(p6_pc), .retire(p6_retire), .ev_stall(p6_ev_stall), .ev_fwd(p6_ev_fwd)
  );

  y86_pipe #(.MEM_BYTES(P5_MEM_BYTES)) u_p5 (
    .clk, .rst,
    .ld_we(p5_ld_we), .ld_addr(p5_ld_addr), .ld_data(p5_ld_data),
    .dbg_reg(p5_dbg_reg), .dbg_regval(p5_dbg_regval),
    .dbg_addr(p5_dbg_addr), .dbg_memval(p5_dbg_memval),
    .stat(p5_stat), .retire(p5_retire),
    .ev_load_use(p5_ev_load_use), .ev_mispredict(p5_ev_mispredict),
    .ev_ret_stall(p5_ev_ret_stall), .ev_fwd(p5_ev_fwd)
  );

endmodule
