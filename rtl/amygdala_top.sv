// amygdala_top -- FPGA side of the perception-to-actuator pipeline.
//
// Signal flow: the inference processor sends one argmax frame (one 8-bit class index
// per classifier row) over SPI; spi_argmax_rx checks and commits the frame; the frame
// is then arbitrated in hardware, and the only path to the actuator pins runs through
// that arbitration, which can select nothing but one of the pre-wired options.
//
// Two arbiters share the committed frame:
//   * u_node, the single amygdala node of the basic system (A = f o pi), drives the
//     M actuator pins act_drive directly, exactly one of them at a time;
//   * u_dag, a decision DAG of amygdala nodes for domains that need several chained
//     decisions; its final action is one-hot over the union of its option sets.
// Both arbiters running side by side on one frame is this design's way of bringing
// both forms out; a product would normally fit only the one it needs.
//
// Timing (clk cycles): frame_valid pulses 3 cycles after CS rises at the pin,
// act_drive changes 1 cycle later, dag_action 2 cycles later. At a 12 MHz clk the
// whole path from CS rising to act_drive is 4 cycles, about 0.33 us.
module amygdala_top
  import amygdala_pkg::*;
#(
  parameter int unsigned N = 50
) (
  input  logic                clk,
  input  logic                rst_n,
  // SPI link from the inference processor
  input  logic                spi_sck,
  input  logic                spi_cs_n,
  input  logic                spi_mosi,
  // status
  output logic                frame_valid,
  output logic                frame_err,
  // single-node arbiter: pre-wired actuator option pins
  output logic [QC_M-1:0]     act_drive,
  output logic [OPT_W-1:0]    act_opt,
  output logic [ROW_W-1:0]    act_row,
  output logic                act_default,
  output logic                act_valid,
  // decision DAG
  output logic [3+3+5+DAG_K-1:0] dag_action,
  output logic [NODE_W-1:0]   dag_final_node,
  output logic [OPT_W-1:0]    dag_final_opt,
  output logic [DAG_NODES-1:0] dag_visited,
  output logic                dag_valid
);

  logic [N-1:0][CLS_W-1:0] argmax;

  spi_argmax_rx #(.N(N)) u_rx (
    .clk(clk), .rst_n(rst_n),
    .spi_sck(spi_sck), .spi_cs_n(spi_cs_n), .spi_mosi(spi_mosi),
    .argmax(argmax), .frame_valid(frame_valid), .frame_err(frame_err)
  );

  amygdala_node #(
    .N(N), .M(QC_M), .NUM_ENTRIES(QC_ENTRIES), .ENTRIES(QC_TABLE), .SAFE_OPT(QC_SAFE)
  ) u_node (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .act_drive(act_drive), .opt_idx(act_opt), .sel_row(act_row),
    .used_default(act_default), .out_valid(act_valid)
  );

  decision_dag #(.N(N)) u_dag (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .action(dag_action), .final_node(dag_final_node), .final_opt(dag_final_opt),
    .visited(dag_visited), .out_valid(dag_valid)
  );

endmodule
