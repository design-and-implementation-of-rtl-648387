// davrid_cluster -- one DAVRID cluster: NNODES nodes around one NIMU.
//
// DAVRID is a dataflow / von Neumann hybrid. Programs are cut into threads
// that never wait once started; a thread becomes runnable when the
// synchronization counter in its frame, decremented by every arriving value
// or signal, runs out. Each node runs runnable threads on its TPU and leaves
// synchronization and frame management to its SU; the cluster's NIMU routes
// messages, holds the cluster's Structured Memory and picks the node for
// every new frame. Clusters are joined by an interconnection network.
//
// This block wires up to four davrid_node instances to one nimu. For node i
// the NIMU fills ITQ i and empties ETQ i; node i's identifier is
// {cluster_id, i}. The processors that run the threads (one TPU per node) and
// the network are outside this block: each node's TPU ports are the
// `tpu_*` arrays, indexed by node number, and the network and host ports are
// valid/ready message ports. All sizes default to the message formats of the
// document: 2^20-word FMs and SM, frames of up to 2^10 words, 4 nodes.
// The queue depth (512 messages) is this design's choice: the queues have no
// flow control beyond their full flags, so they must hold the bursts of a
// fanning-out program (see uim).
module davrid_cluster
  import davrid_pkg::*;
#(
  parameter int unsigned NNODES     = 4,
  parameter int unsigned FM_AW      = FBA_W,
  parameter int unsigned FRAME_LOG  = DISP_W,
  parameter int unsigned Q_DEPTH    = 512,
  parameter int unsigned SM_AW      = FBA_W,
  parameter int unsigned SM_BLK_LOG = 10,
  parameter int unsigned DEF_N      = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  // TPU side of every node
  input  logic [NNODES-1:0]    tpu_atq_pop,
  output cont_t                tpu_atq_rdata [NNODES],
  output logic [NNODES-1:0]    tpu_atq_empty,
  input  logic [NNODES-1:0]    tpu_stq_push,
  input  stq_t                 tpu_stq_wdata [NNODES],
  output logic [NNODES-1:0]    tpu_stq_full,
  input  logic [NNODES-1:0]    tpu_etq_push,
  input  msg_t                 tpu_etq_wdata [NNODES],
  output logic [NNODES-1:0]    tpu_etq_ready,
  input  logic [NNODES-1:0]    tpu_fm_en,
  input  logic [NNODES-1:0]    tpu_fm_we,
  input  logic [FM_AW-1:0]     tpu_fm_addr  [NNODES],
  input  logic [WORD_W-1:0]    tpu_fm_wdata [NNODES],
  output logic [WORD_W-1:0]    tpu_fm_rdata [NNODES],
  // interconnection network
  input  logic                 net_in_valid,
  input  msg_t                 net_in_data,
  output logic                 net_in_ready,
  output logic                 net_out_valid,
  output msg_t                 net_out_data,
  input  logic                 net_out_ready,
  // host
  output logic                 host_valid,
  output msg_t                 host_data,
  input  logic                 host_ready,
  // status
  output logic [NNODES-1:0]    su_busy,
  output logic                 sm_busy,
  output logic [FM_AW-FRAME_LOG:0] frames_in_use [NNODES],
  output logic [FBA_W:0]       load [NNODES],
  output logic                 err_su_alloc,
  output logic                 err_su_msg,
  output logic                 err_istore,
  output logic                 err_sm_alloc,
  output logic                 err_defer,
  output logic                 err_sm_msg
);
  msg_t              etq_rdata [NNODES];
  logic [NNODES-1:0] etq_empty, etq_pop, itq_push, itq_full;
  logic [NNODES-1:0] n_err_alloc, n_err_msg;
  msg_t              itq_wdata;

  for (genvar i = 0; i < NNODES; i++) begin : g_node
    davrid_node #(.FM_AW(FM_AW), .FRAME_LOG(FRAME_LOG), .Q_DEPTH(Q_DEPTH)) u_node (
      .clk, .rst_n,
      .node_id({cluster_id, LNODE_W'(i)}),
      .tpu_atq_pop(tpu_atq_pop[i]), .tpu_atq_rdata(tpu_atq_rdata[i]), .tpu_atq_empty(tpu_atq_empty[i]),
      .tpu_stq_push(tpu_stq_push[i]), .tpu_stq_wdata(tpu_stq_wdata[i]), .tpu_stq_full(tpu_stq_full[i]),
      .tpu_etq_push(tpu_etq_push[i]), .tpu_etq_wdata(tpu_etq_wdata[i]), .tpu_etq_ready(tpu_etq_ready[i]),
      .tpu_fm_en(tpu_fm_en[i]), .tpu_fm_we(tpu_fm_we[i]), .tpu_fm_addr(tpu_fm_addr[i]),
      .tpu_fm_wdata(tpu_fm_wdata[i]), .tpu_fm_rdata(tpu_fm_rdata[i]),
      .itq_push(itq_push[i]), .itq_wdata, .itq_full(itq_full[i]),
      .etq_pop(etq_pop[i]), .etq_rdata(etq_rdata[i]), .etq_empty(etq_empty[i]),
      .su_busy(su_busy[i]), .err_alloc(n_err_alloc[i]), .err_msg(n_err_msg[i]),
      .frames_in_use(frames_in_use[i])
    );
  end

  nimu #(.NNODES(NNODES), .SM_AW(SM_AW), .SM_BLK_LOG(SM_BLK_LOG), .DEF_N(DEF_N)) u_nimu (
    .clk, .rst_n, .cluster_id,
    .etq_rdata, .etq_empty, .etq_pop,
    .itq_push, .itq_wdata, .itq_full,
    .net_in_valid, .net_in_data, .net_in_ready,
    .net_out_valid, .net_out_data, .net_out_ready,
    .host_valid, .host_data, .host_ready,
    .load, .sm_busy,
    .err_istore, .err_alloc(err_sm_alloc), .err_defer, .err_msg(err_sm_msg)
  );

  assign err_su_alloc = |n_err_alloc;
  assign err_su_msg   = |n_err_msg;
endmodule
