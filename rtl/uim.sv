// uim -- Unit Interface Module of a DAVRID node.
//
// The UIM is the meeting point of the three units around a node: it holds
// the Frame Memory and the four message queues through which the TPU, the SU
// and the NIMU talk.
//
//   ATQ  Active Thread Queue    SU  -> TPU   continuations <fp, ip> ready to run
//   STQ  Setup Token Queue      TPU -> SU    continuations and local syncs
//   ITQ  Internal Token Queue   NIMU -> SU   messages for this node
//   ETQ  External Token Queue   TPU/SU -> NIMU  messages leaving this node
//
// The FM has one port for the TPU (port A) and one for the SU (port B).
// Every queue is a msg_fifo; all ports use its push/pop and full/empty
// handshake, in one clock domain. Queue depth is a parameter of this design,
// 512 messages by default. The queues have only full flags and no credit
// scheme, so they must absorb the bursts of a program that fans out faster
// than the NIMU delivers: with 64 entries the recursive Fibonacci benchmark
// locks up (every ETQ and ITQ full, every SU waiting to send a reply), with
// 256 it completes.
module uim
  import davrid_pkg::*;
#(
  parameter int unsigned FM_AW   = FBA_W,
  parameter int unsigned Q_DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  // FM port A (TPU)
  input  logic             fma_en,
  input  logic             fma_we,
  input  logic [FM_AW-1:0] fma_addr,
  input  logic [WORD_W-1:0] fma_wdata,
  output logic [WORD_W-1:0] fma_rdata,
  // FM port B (SU)
  input  logic             fmb_en,
  input  logic             fmb_we,
  input  logic [FM_AW-1:0] fmb_addr,
  input  logic [WORD_W-1:0] fmb_wdata,
  output logic [WORD_W-1:0] fmb_rdata,
  // ATQ
  input  logic             atq_push,
  input  cont_t            atq_wdata,
  output logic             atq_full,
  input  logic             atq_pop,
  output cont_t            atq_rdata,
  output logic             atq_empty,
  // STQ
  input  logic             stq_push,
  input  stq_t             stq_wdata,
  output logic             stq_full,
  input  logic             stq_pop,
  output stq_t             stq_rdata,
  output logic             stq_empty,
  // ITQ
  input  logic             itq_push,
  input  msg_t             itq_wdata,
  output logic             itq_full,
  input  logic             itq_pop,
  output msg_t             itq_rdata,
  output logic             itq_empty,
  // ETQ
  input  logic             etq_push,
  input  msg_t             etq_wdata,
  output logic             etq_full,
  input  logic             etq_pop,
  output msg_t             etq_rdata,
  output logic             etq_empty
);
  localparam int unsigned CW = $clog2(Q_DEPTH + 1);
  logic [CW-1:0] atq_cnt, stq_cnt, itq_cnt, etq_cnt;

  frame_memory #(.AW(FM_AW), .DW(WORD_W)) u_fm (
    .clk,
    .a_en(fma_en), .a_we(fma_we), .a_addr(fma_addr), .a_wdata(fma_wdata), .a_rdata(fma_rdata),
    .b_en(fmb_en), .b_we(fmb_we), .b_addr(fmb_addr), .b_wdata(fmb_wdata), .b_rdata(fmb_rdata)
  );

  msg_fifo #(.WIDTH($bits(cont_t)), .DEPTH(Q_DEPTH)) u_atq (
    .clk, .rst_n, .push(atq_push), .wdata(atq_wdata), .pop(atq_pop), .rdata(atq_rdata),
    .full(atq_full), .empty(atq_empty), .count(atq_cnt)
  );

  msg_fifo #(.WIDTH($bits(stq_t)), .DEPTH(Q_DEPTH)) u_stq (
    .clk, .rst_n, .push(stq_push), .wdata(stq_wdata), .pop(stq_pop), .rdata(stq_rdata),
    .full(stq_full), .empty(stq_empty), .count(stq_cnt)
  );

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(Q_DEPTH)) u_itq (
    .clk, .rst_n, .push(itq_push), .wdata(itq_wdata), .pop(itq_pop), .rdata(itq_rdata),
    .full(itq_full), .empty(itq_empty), .count(itq_cnt)
  );

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(Q_DEPTH)) u_etq (
    .clk, .rst_n, .push(etq_push), .wdata(etq_wdata), .pop(etq_pop), .rdata(etq_rdata),
    .full(etq_full), .empty(etq_empty), .count(etq_cnt)
  );
endmodule
