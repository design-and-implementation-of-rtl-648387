// su -- Synchronization Unit of a DAVRID node.
//
// The SU is the node's message handler. It takes messages from the ITQ and
// setup tokens from the STQ and carries out what each asks, so that the TPU
// only ever runs threads whose inputs are all present:
//
//   START / STARTN  FM[fp+disp] <- value, then synchronize on FM[fp+off]
//   STARTn          synchronize on FM[fp+off] (a signal, no value)
//   STARTr          as START, then send a STARTn signal back to the frame
//                   <w[1]> at offset w[2] (the r_off operand)
//   FALLOC          take a free frame, initialise its slot at offset 0 to
//                   w[1] = {count, entry ip}, send START with the global frame
//                   address {node, fp} to <NODE, FBA, OFF, DISP> of the request
//   M_FALLOC        as FALLOC, but start the frame's entry thread at once
//                   instead of replying (the main function frame)
//   FDEALLOC, LDEALLOC, PLDEALLOC  give the frame at FBA back
//   STQ <fp, ip>    move a continuation made by the TPU to the ATQ (STARTd)
//   STQ <fp, off>   synchronize on FM[fp+off] (STARTln)
//
// Synchronizing reads the slot {sc, ip}: if sc is 1 the continuation
// <fp, ip> goes to the ATQ and the slot is left as it is, otherwise sc-1 is
// written back. This is the START handler of the document step for step.
//
// The original SU is a RISC processor running a fixed message handler from
// EPROM; here the handler is a state machine, one item at a time, with the
// STQ served before the ITQ. A START that only decrements occupies the SU
// for 3 cycles (take, read slot, write slot); one that activates for 4 plus
// any wait for room in the ATQ. Frames are fixed blocks of 2^FRAME_LOG
// words (enough for any 10-bit displacement); a request for more, or with no
// free block, sets `err_alloc` and is answered with an all-ones frame
// address. Messages of any other type set `err_msg` and are dropped. These
// sizes, the priority and the error handling are choices of this design.
module su
  import davrid_pkg::*;
#(
  parameter int unsigned FM_AW     = FBA_W,
  parameter int unsigned FRAME_LOG = DISP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // ITQ (delete side)
  input  msg_t              itq_rdata,
  input  logic              itq_empty,
  output logic              itq_pop,
  // STQ (delete side)
  input  stq_t              stq_rdata,
  input  logic              stq_empty,
  output logic              stq_pop,
  // ATQ (insert side)
  output logic              atq_push,
  output cont_t             atq_wdata,
  input  logic              atq_full,
  // ETQ (insert side, shared with the TPU)
  output logic              etq_push,
  output msg_t              etq_wdata,
  input  logic              etq_ready,
  // FM port B
  output logic              fm_en,
  output logic              fm_we,
  output logic [FM_AW-1:0]  fm_addr,
  output logic [WORD_W-1:0] fm_wdata,
  input  logic [WORD_W-1:0] fm_rdata,
  // status
  output logic              busy,
  output logic              err_alloc,
  output logic              err_msg,
  output logic [FM_AW-FRAME_LOG:0] frames_in_use
);
  localparam int unsigned NBLK = 2 ** (FM_AW - FRAME_LOG);
  localparam int unsigned BW   = FM_AW - FRAME_LOG;

  typedef enum logic [2:0] {
    S_IDLE, S_SYNC_RD, S_SYNC_WT, S_ACT, S_ALLOC, S_SEND
  } state_e;

  state_e           state;
  logic [FM_AW-1:0] fp;
  logic [OFF_W-1:0] off;
  logic [IP_W-1:0]  act_ip;
  logic             reply_pending;   // a message is to be sent after S_ACT
  msg_t             req;             // message being handled
  msg_t             reply;

  // block allocator
  logic          ba_alloc, ba_avail, ba_free;
  logic [BW-1:0] ba_idx, ba_free_idx;

  block_alloc #(.NBLK(NBLK)) u_alloc (
    .clk, .rst_n,
    .alloc(ba_alloc), .avail(ba_avail), .alloc_idx(ba_idx),
    .free(ba_free), .free_idx(ba_free_idx), .in_use(frames_in_use)
  );

  logic [SC_W-1:0] slot_sc;
  logic [IP_W-1:0] slot_ip;
  assign slot_sc = fm_rdata[WORD_W-1 -: SC_W];
  assign slot_ip = fm_rdata[IP_W-1:0];

  logic [FM_AW-1:0] new_fp;
  assign new_fp = {ba_idx, {FRAME_LOG{1'b0}}};

  logic alloc_ok;
  assign alloc_ok = ba_avail && (req.w[0] <= WORD_W'(2 ** FRAME_LOG));

  // ---------------------------------------------------------------- control
  always_comb begin
    itq_pop     = 1'b0;
    stq_pop     = 1'b0;
    atq_push    = 1'b0;
    atq_wdata   = '{fp: FBA_W'(fp), ip: act_ip};
    etq_push    = 1'b0;
    etq_wdata   = reply;
    fm_en       = 1'b0;
    fm_we       = 1'b0;
    fm_addr     = fp + FM_AW'(off);
    fm_wdata    = '0;
    ba_alloc    = 1'b0;
    ba_free     = 1'b0;
    ba_free_idx = itq_rdata.hdr.fba[FM_AW-1:FRAME_LOG];

    unique case (state)
      S_IDLE: begin
        if (!stq_empty) begin
          stq_pop = 1'b1;
        end else if (!itq_empty) begin
          itq_pop = 1'b1;
          unique case (itq_rdata.hdr.mt)
            MT_START, MT_STARTNV, MT_STARTR: begin
              fm_en    = 1'b1;
              fm_we    = 1'b1;
              fm_addr  = FM_AW'(itq_rdata.hdr.fba) + FM_AW'(itq_rdata.hdr.disp);
              fm_wdata = itq_rdata.w[0];
            end
            MT_FDEALLOC, MT_LDEALLOC, MT_PLDEALLOC: ba_free = 1'b1;
            default: ;
          endcase
        end
      end
      S_SYNC_RD: begin
        fm_en = 1'b1;
      end
      S_SYNC_WT: begin
        if (slot_sc > SC_W'(1)) begin
          fm_en    = 1'b1;
          fm_we    = 1'b1;
          fm_wdata = {slot_sc - 1'b1, slot_ip};
        end
      end
      S_ACT: begin
        atq_push = !atq_full;
      end
      S_ALLOC: begin
        ba_alloc = alloc_ok;
        if (alloc_ok) begin
          fm_en    = 1'b1;
          fm_we    = 1'b1;
          fm_addr  = new_fp;
          fm_wdata = req.w[1];
        end
      end
      S_SEND: begin
        etq_push = etq_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      fp            <= '0;
      off           <= '0;
      act_ip        <= '0;
      reply_pending <= 1'b0;
      req           <= '0;
      reply         <= '0;
      err_alloc     <= 1'b0;
      err_msg       <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          reply_pending <= 1'b0;
          if (!stq_empty) begin
            fp <= FM_AW'(stq_rdata.fp);
            if (stq_rdata.kind == STQ_CONT) begin
              act_ip <= stq_rdata.arg;
              state  <= S_ACT;
            end else begin
              off   <= stq_rdata.arg[OFF_W-1:0];
              state <= S_SYNC_RD;
            end
          end else if (!itq_empty) begin
            req <= itq_rdata;
            fp  <= FM_AW'(itq_rdata.hdr.fba);
            off <= itq_rdata.hdr.off;
            unique case (itq_rdata.hdr.mt)
              MT_START, MT_STARTNV, MT_STARTN: state <= S_SYNC_RD;
              MT_STARTR: begin
                // the signal back to the sender: STARTn to <w[1]> at r_off
                reply <= mk_start(MT_STARTN, itq_rdata.w[1][WORD_W-1 -: NODE_W],
                                  itq_rdata.w[1][FBA_W-1:0], itq_rdata.w[2][OFF_W-1:0],
                                  '0, '0);
                reply_pending <= 1'b1;
                state <= S_SYNC_RD;
              end
              MT_FALLOC, MT_M_FALLOC: state <= S_ALLOC;
              MT_FDEALLOC, MT_LDEALLOC, MT_PLDEALLOC: state <= S_IDLE;
              default: err_msg <= 1'b1;
            endcase
          end
        end
        S_SYNC_RD: state <= S_SYNC_WT;
        S_SYNC_WT: begin
          act_ip <= slot_ip;
          if (slot_sc <= SC_W'(1))  state <= S_ACT;
          else if (reply_pending)   state <= S_SEND;
          else                      state <= S_IDLE;
        end
        S_ACT: begin
          if (!atq_full) state <= reply_pending ? S_SEND : S_IDLE;
        end
        S_ALLOC: begin
          if (alloc_ok) begin
            fp <= new_fp;
            if (req.hdr.mt == MT_M_FALLOC) begin
              act_ip <= req.w[1][IP_W-1:0];
              state  <= S_ACT;
            end else begin
              reply <= mk_start(MT_START, req.hdr.node, req.hdr.fba, req.hdr.off,
                                req.hdr.disp, {node_id, FBA_W'(new_fp)});
              state <= S_SEND;
            end
          end else begin
            err_alloc <= 1'b1;
            reply <= mk_start(MT_START, req.hdr.node, req.hdr.fba, req.hdr.off,
                              req.hdr.disp, '1);
            state <= (req.hdr.mt == MT_M_FALLOC) ? S_IDLE : S_SEND;
          end
        end
        S_SEND: begin
          if (etq_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !(itq_pop && stq_pop));
endmodule
