// nimu -- Node Interface and Management Unit of a DAVRID cluster.
//
// The NIMU serves the whole cluster: it routes every message between the
// nodes, the interconnection network and the host (nimu_router), it keeps the
// cluster's Structured Memory and serves its I-structure operations
// (nimu_sm), and it spreads frame allocations over the nodes (nimu_lb, inside
// the router). Requests for the SM and the SM's answers pass through two
// small queues of SMQ_DEPTH messages between router and SM handler.
//
// Node side: the delete port of every node's ETQ and the insert port of
// every node's ITQ, as arrays indexed by node number in the cluster. Network
// and host ports use valid/ready. `cluster_id` is the 10-bit identifier that
// SM addresses and node identifiers of this cluster carry.
module nimu
  import davrid_pkg::*;
#(
  parameter int unsigned NNODES     = 4,
  parameter int unsigned SM_AW      = FBA_W,
  parameter int unsigned SM_BLK_LOG = 10,
  parameter int unsigned DEF_N      = 256,
  parameter int unsigned SMQ_DEPTH  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  input  msg_t                 etq_rdata [NNODES],
  input  logic [NNODES-1:0]    etq_empty,
  output logic [NNODES-1:0]    etq_pop,
  output logic [NNODES-1:0]    itq_push,
  output msg_t                 itq_wdata,
  input  logic [NNODES-1:0]    itq_full,
  input  logic                 net_in_valid,
  input  msg_t                 net_in_data,
  output logic                 net_in_ready,
  output logic                 net_out_valid,
  output msg_t                 net_out_data,
  input  logic                 net_out_ready,
  output logic                 host_valid,
  output msg_t                 host_data,
  input  logic                 host_ready,
  output logic [FBA_W:0]       load [NNODES],
  output logic                 sm_busy,
  output logic                 err_istore,
  output logic                 err_alloc,
  output logic                 err_defer,
  output logic                 err_msg
);
  localparam int unsigned QCW = $clog2(SMQ_DEPTH + 1);

  logic          sm_push, sm_full, sm_empty, sm_pop;
  msg_t          sm_wdata, sm_rdata;
  logic          smr_push, smr_full, smr_empty, smr_pop;
  msg_t          smr_wdata, smr_rdata;
  logic [QCW-1:0] sm_cnt, smr_cnt;

  nimu_router #(.NNODES(NNODES), .LB_W(FBA_W + 1)) u_router (
    .clk, .rst_n, .cluster_id,
    .etq_rdata, .etq_empty, .etq_pop,
    .itq_push, .itq_wdata, .itq_full,
    .sm_push, .sm_wdata, .sm_full,
    .smr_rdata, .smr_empty, .smr_pop,
    .net_in_valid, .net_in_data, .net_in_ready,
    .net_out_valid, .net_out_data, .net_out_ready,
    .host_valid, .host_data, .host_ready,
    .load
  );

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(SMQ_DEPTH)) u_smq (
    .clk, .rst_n, .push(sm_push), .wdata(sm_wdata), .pop(sm_pop), .rdata(sm_rdata),
    .full(sm_full), .empty(sm_empty), .count(sm_cnt)
  );

  nimu_sm #(.SM_AW(SM_AW), .BLK_LOG(SM_BLK_LOG), .DEF_N(DEF_N)) u_sm (
    .clk, .rst_n, .cluster_id,
    .in_rdata(sm_rdata), .in_empty(sm_empty), .in_pop(sm_pop),
    .out_push(smr_push), .out_wdata(smr_wdata), .out_full(smr_full),
    .busy(sm_busy), .err_istore, .err_alloc, .err_defer, .err_msg
  );

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(SMQ_DEPTH)) u_smrq (
    .clk, .rst_n, .push(smr_push), .wdata(smr_wdata), .pop(smr_pop), .rdata(smr_rdata),
    .full(smr_full), .empty(smr_empty), .count(smr_cnt)
  );
endmodule
