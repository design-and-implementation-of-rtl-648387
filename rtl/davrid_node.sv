// davrid_node -- one DAVRID node: Unit Interface Module plus Synchronization Unit.
//
// A node runs threads on its TPU, keeps their frames in its own FM, and
// synchronizes them in its SU. The TPU is a conventional processor outside
// this block: its side of the ATQ, STQ and ETQ and its FM port are the
// `tpu_*` ports. The NIMU side of the ITQ and the ETQ are the `itq_*` and
// `etq_*` ports.
//
// The TPU and the SU both insert messages into the ETQ. The SU goes first:
// `tpu_etq_ready` is low while the SU inserts or while the ETQ is full, and a
// TPU insert is taken only when `tpu_etq_ready` is high. That shared insert
// port is this design's choice; in the original machine both processors
// write the memory-mapped queue.
//
// `node_id` is the global identifier {cluster, node in cluster} the SU puts
// into the frame addresses it hands out.
module davrid_node
  import davrid_pkg::*;
#(
  parameter int unsigned FM_AW     = FBA_W,
  parameter int unsigned FRAME_LOG = DISP_W,
  parameter int unsigned Q_DEPTH   = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // TPU side
  input  logic              tpu_atq_pop,
  output cont_t             tpu_atq_rdata,
  output logic              tpu_atq_empty,
  input  logic              tpu_stq_push,
  input  stq_t              tpu_stq_wdata,
  output logic              tpu_stq_full,
  input  logic              tpu_etq_push,
  input  msg_t              tpu_etq_wdata,
  output logic              tpu_etq_ready,
  input  logic              tpu_fm_en,
  input  logic              tpu_fm_we,
  input  logic [FM_AW-1:0]  tpu_fm_addr,
  input  logic [WORD_W-1:0] tpu_fm_wdata,
  output logic [WORD_W-1:0] tpu_fm_rdata,
  // NIMU side
  input  logic              itq_push,
  input  msg_t              itq_wdata,
  output logic              itq_full,
  input  logic              etq_pop,
  output msg_t              etq_rdata,
  output logic              etq_empty,
  // status
  output logic              su_busy,
  output logic              err_alloc,
  output logic              err_msg,
  output logic [FM_AW-FRAME_LOG:0] frames_in_use
);
  // SU <-> UIM
  msg_t              itq_rdata;
  logic              itq_empty, itq_pop;
  stq_t              stq_rdata;
  logic              stq_empty, stq_pop;
  logic              atq_push, atq_full;
  cont_t             atq_wdata;
  logic              su_etq_push, etq_full, etq_push;
  msg_t              su_etq_wdata, etq_wdata;
  logic              fmb_en, fmb_we;
  logic [FM_AW-1:0]  fmb_addr;
  logic [WORD_W-1:0] fmb_wdata, fmb_rdata;

  assign tpu_etq_ready = !etq_full && !su_etq_push;
  assign etq_push      = su_etq_push || (tpu_etq_push && tpu_etq_ready);
  assign etq_wdata     = su_etq_push ? su_etq_wdata : tpu_etq_wdata;

  uim #(.FM_AW(FM_AW), .Q_DEPTH(Q_DEPTH)) u_uim (
    .clk, .rst_n,
    .fma_en(tpu_fm_en), .fma_we(tpu_fm_we), .fma_addr(tpu_fm_addr),
    .fma_wdata(tpu_fm_wdata), .fma_rdata(tpu_fm_rdata),
    .fmb_en, .fmb_we, .fmb_addr, .fmb_wdata, .fmb_rdata,
    .atq_push, .atq_wdata, .atq_full,
    .atq_pop(tpu_atq_pop), .atq_rdata(tpu_atq_rdata), .atq_empty(tpu_atq_empty),
    .stq_push(tpu_stq_push), .stq_wdata(tpu_stq_wdata), .stq_full(tpu_stq_full),
    .stq_pop, .stq_rdata, .stq_empty,
    .itq_push, .itq_wdata, .itq_full,
    .itq_pop, .itq_rdata, .itq_empty,
    .etq_push, .etq_wdata, .etq_full,
    .etq_pop, .etq_rdata, .etq_empty
  );

  su #(.FM_AW(FM_AW), .FRAME_LOG(FRAME_LOG)) u_su (
    .clk, .rst_n, .node_id,
    .itq_rdata, .itq_empty, .itq_pop,
    .stq_rdata, .stq_empty, .stq_pop,
    .atq_push, .atq_wdata, .atq_full,
    .etq_push(su_etq_push), .etq_wdata(su_etq_wdata), .etq_ready(!etq_full),
    .fm_en(fmb_en), .fm_we(fmb_we), .fm_addr(fmb_addr), .fm_wdata(fmb_wdata), .fm_rdata(fmb_rdata),
    .busy(su_busy), .err_alloc, .err_msg, .frames_in_use
  );
endmodule
