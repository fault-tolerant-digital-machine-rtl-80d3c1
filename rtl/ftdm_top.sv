// ftdm_top: all fail-safe and fault-tolerant machines side by side.
//
// The designs are independent; each keeps its own ports, prefixed by its
// name, and all share clk and rst (synchronous, active high):
//   fs_tt_*    failsafe_tt    fail-safe 3-state machine, transition table
//   fs_km_*    failsafe_km    same machine, modified Karnaugh map
//   fs_nand_*  failsafe_nand  same machine, NAND-only logic
//   fs_auto_*  failsafe_auto  fail-safe autonomous 4-state cycle
//   cnt_*      ft_counter     Reed-Muller coded single-fault-tolerant counter
//   rcnt_*     ft_counter_rm  the same construction at four stages
//   cm_*       ft_cell_machine  3-state detector of TMR cell-blocks
//   ring_*     ft_cell_ring   7-state cycle of TMR cell-blocks
//   rs1_*      rom_system1    PROM machine, both successors per word
//   rs2_*      rom_system2    PROM machine addressed by {state, x}
//   ftr_*      ft_rom_system  Hamming-coded PROM, triplicated decoders
// No logic is shared between them; see each module for its timing.
module ftdm_top (
  input  logic       clk,
  input  logic       rst,
  // fail-safe machines
  input  logic       fs_x,
  output logic [2:0] fs_tt_y,
  output logic       fs_tt_fstate,
  output logic [2:0] fs_km_y,
  output logic       fs_km_fstate,
  output logic [2:0] fs_nand_y,
  output logic       fs_nand_fstate0,
  output logic       fs_nand_fstate1,
  output logic [3:0] fs_auto_y,
  output logic       fs_auto_fstate,
  // fault-tolerant counter
  input  logic       cnt_en,
  output logic [2:0] cnt_a,
  output logic [2:0] cnt_b,
  output logic [2:0] cnt_count,
  input  logic       rcnt_en,
  output logic [3:0] rcnt_a,
  output logic [3:0] rcnt_b,
  output logic [3:0] rcnt_count,
  // cell-block machines
  input  logic       cm_x,
  output logic [2:0] cm_cell_q [3],
  output logic [2:0] cm_z,
  input  logic       ring_x,
  output logic [6:0] ring_state [3],
  // PROM machines
  input  logic       rs1_x,
  output logic [3:0] rs1_state,
  output logic       rs1_z,
  input  logic       rs1_prog_we,
  input  logic [3:0] rs1_prog_addr,
  input  logic [9:0] rs1_prog_data,
  input  logic       rs2_x,
  output logic [2:0] rs2_state,
  output logic       rs2_z,
  input  logic       rs2_prog_we,
  input  logic [3:0] rs2_prog_addr,
  input  logic [3:0] rs2_prog_data,
  input  logic       ftr_x,
  output logic [2:0] ftr_state,
  output logic [2:0] ftr_buf_state [3],
  output logic       ftr_z,
  output logic [2:0] ftr_syndrome,
  input  logic       ftr_prog_we,
  input  logic [3:0] ftr_prog_addr,
  input  logic [6:0] ftr_prog_data
);
  failsafe_tt u_fs_tt (
    .clk(clk), .rst(rst), .x(fs_x), .y(fs_tt_y), .fstate(fs_tt_fstate)
  );
  failsafe_km u_fs_km (
    .clk(clk), .rst(rst), .x(fs_x), .y(fs_km_y), .fstate(fs_km_fstate)
  );
  failsafe_nand u_fs_nand (
    .clk(clk), .rst(rst), .x(fs_x), .y(fs_nand_y),
    .fstate0(fs_nand_fstate0), .fstate1(fs_nand_fstate1)
  );
  failsafe_auto u_fs_auto (
    .clk(clk), .rst(rst), .y(fs_auto_y), .fstate(fs_auto_fstate)
  );

  ft_counter u_cnt (
    .clk(clk), .rst(rst), .en(cnt_en), .a(cnt_a), .b(cnt_b), .count(cnt_count)
  );
  ft_counter_rm u_rcnt (
    .clk(clk), .rst(rst), .en(rcnt_en), .a(rcnt_a), .b(rcnt_b), .count(rcnt_count)
  );

  ft_cell_machine u_cm (
    .clk(clk), .rst(rst), .x(cm_x), .cell_q(cm_cell_q), .z(cm_z)
  );
  ft_cell_ring #(.N_STATES(7)) u_ring (
    .clk(clk), .rst(rst), .x(ring_x), .state(ring_state)
  );

  rom_system1 u_rs1 (
    .clk(clk), .rst(rst), .x(rs1_x), .state(rs1_state), .z(rs1_z),
    .prog_we(rs1_prog_we), .prog_addr(rs1_prog_addr), .prog_data(rs1_prog_data)
  );
  rom_system2 u_rs2 (
    .clk(clk), .rst(rst), .x(rs2_x), .state(rs2_state), .z(rs2_z),
    .prog_we(rs2_prog_we), .prog_addr(rs2_prog_addr), .prog_data(rs2_prog_data)
  );
  ft_rom_system u_ftr (
    .clk(clk), .rst(rst), .x(ftr_x), .state(ftr_state), .buf_state(ftr_buf_state),
    .z(ftr_z), .syndrome(ftr_syndrome),
    .prog_we(ftr_prog_we), .prog_addr(ftr_prog_addr), .prog_data(ftr_prog_data)
  );
endmodule
