// nimu_sm -- Structured Memory (SM) of a cluster and its message handler.
//
// Global data live in the SM, which belongs to the cluster's NIMU and is
// reached only through messages. Each SM word carries a presence tag, so it
// works as an I-structure: a read of a word not yet written is remembered and
// answered when the write comes.
//
//   ILOAD   smaddr, off, disp; w[0] = {NODE, FBA} of the requester
//           full word  -> START <NODE, FBA, off, disp> with the value
//           otherwise  -> the request goes onto the word's deferred list
//   ISTORE  smaddr, off; w[0] = requester, w[1] = value
//           store, mark full, answer every deferred ILOAD, then send a
//           STARTn signal to <NODE, FBA, off>
//   ISTOREr smaddr; w[1] = value: as ISTORE, without the signal
//   HALLOC  off, disp; w[0] = requester, w[1] = number of words
//           take a free block, mark its words empty, send START with the
//           global SM address {cluster, 2'b00, base} to the requester
//   HDEALLOC smaddr: give the block holding smaddr back
//
// Tags: EMPTY, FULL, and DEFERRED, where the data field of a DEFERRED word
// holds the number of the first cell of its deferred list. Each cell holds
// one waiting ILOAD and a link to the next; cells come from a block_alloc
// pool of DEF_N. A second store to a full word sets `err_istore` and
// overwrites; a HALLOC larger than a block, or with no block free, sets
// `err_alloc` and is answered with an all-ones address; a deferred ILOAD with
// no free cell sets `err_defer` and is dropped; an unknown type sets
// `err_msg`.
//
// The original SM handler is program code on the NIMU processor. This state
// machine, the block layout (blocks of 2^BLK_LOG words), the cell pool and
// the error handling are this design's choices; the message semantics are the
// document's. The SM has a one-cycle synchronous read. Messages come in
// through a FIFO delete port (`in_*`) and answers leave through a FIFO insert
// port (`out_*`). An ILOAD of a full word is answered 2 cycles after it is taken
// when the output is free.
module nimu_sm
  import davrid_pkg::*;
#(
  parameter int unsigned SM_AW   = FBA_W,
  parameter int unsigned BLK_LOG = 10,
  parameter int unsigned DEF_N   = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  // requests
  input  msg_t                 in_rdata,
  input  logic                 in_empty,
  output logic                 in_pop,
  // answers
  output logic                 out_push,
  output msg_t                 out_wdata,
  input  logic                 out_full,
  // status
  output logic                 busy,
  output logic                 err_istore,
  output logic                 err_alloc,
  output logic                 err_defer,
  output logic                 err_msg
);
  localparam int unsigned NBLK = 2 ** (SM_AW - BLK_LOG);
  localparam int unsigned BW   = SM_AW - BLK_LOG;
  localparam int unsigned DW   = $clog2(DEF_N);

  typedef enum logic [1:0] {TAG_EMPTY = 2'd0, TAG_FULL = 2'd1, TAG_DEFERRED = 2'd2} tag_e;

  typedef struct packed {
    logic [NODE_W-1:0] node;
    logic [FBA_W-1:0]  fba;
    logic [OFF_W-1:0]  off;
    logic [DISP_W-1:0] disp;
    logic              has_next;
    logic [DW-1:0]     next;
  } cell_t;

  typedef enum logic [2:0] {
    S_IDLE, S_RD, S_WSEND, S_HALLOC, S_CLR, S_SEND
  } state_e;

  tag_e          sm_tag  [2**SM_AW];
  logic [WORD_W-1:0] sm_data [2**SM_AW];
  cell_t         cells   [DEF_N];

  state_e            state;
  msg_t              req;
  tag_e              q_tag;      // registered SM read
  logic [WORD_W-1:0] q_data;
  logic [DW-1:0]     cur;        // deferred cell being answered
  logic [SM_AW-1:0]  clr_addr;
  logic [SM_AW-1:0]  clr_end;
  msg_t              reply;
  msg_t              wake_msg;

  logic [SM_AW-1:0]  addr;
  assign addr = SM_AW'(req.hdr.fba);

  // SM block pool
  logic          blk_alloc, blk_avail, blk_free;
  logic [BW-1:0] blk_idx, blk_free_idx;
  logic [BW:0]   blk_in_use;
  // deferred cell pool
  logic          cell_alloc, cell_avail, cell_free;
  logic [DW-1:0] cell_idx;
  logic [DW:0]   cells_in_use;

  block_alloc #(.NBLK(NBLK)) u_blocks (
    .clk, .rst_n, .alloc(blk_alloc), .avail(blk_avail), .alloc_idx(blk_idx),
    .free(blk_free), .free_idx(blk_free_idx), .in_use(blk_in_use)
  );

  block_alloc #(.NBLK(DEF_N)) u_cells (
    .clk, .rst_n, .alloc(cell_alloc), .avail(cell_avail), .alloc_idx(cell_idx),
    .free(cell_free), .free_idx(cur), .in_use(cells_in_use)
  );

  logic halloc_ok;
  assign halloc_ok = blk_avail && (req.w[1] <= WORD_W'(2 ** BLK_LOG)) && (req.w[1] != '0);

  logic is_iload, is_istore;
  assign is_iload  = (req.hdr.mt == MT_ILOAD);
  assign is_istore = (req.hdr.mt == MT_ISTORE) || (req.hdr.mt == MT_ISTORER);

  always_comb begin
    cell_t c;
    c = cells[cur];
    wake_msg = mk_start(MT_START, c.node, c.fba, c.off, c.disp, req.w[1]);
  end

  always_comb begin
    in_pop       = 1'b0;
    out_push     = 1'b0;
    out_wdata    = reply;
    blk_alloc    = 1'b0;
    blk_free     = 1'b0;
    blk_free_idx = in_rdata.hdr.fba[SM_AW-1:BLK_LOG];
    cell_alloc   = 1'b0;
    cell_free    = 1'b0;
    unique case (state)
      S_IDLE: begin
        in_pop   = !in_empty;
        blk_free = !in_empty && (in_rdata.hdr.mt == MT_HDEALLOC);
      end
      S_RD: begin
        cell_alloc = is_iload && (q_tag != TAG_FULL) && cell_avail;
      end
      S_WSEND: begin
        out_push  = !out_full;
        out_wdata = wake_msg;
        cell_free = !out_full;
      end
      S_HALLOC: blk_alloc = halloc_ok;
      S_SEND:   out_push  = !out_full;
      default: ;
    endcase
  end

  // SM array: one synchronous read in S_IDLE, writes in S_RD and S_CLR
  always_ff @(posedge clk) begin
    if (state == S_IDLE && !in_empty) begin
      q_tag  <= sm_tag[SM_AW'(in_rdata.hdr.fba)];
      q_data <= sm_data[SM_AW'(in_rdata.hdr.fba)];
    end
    if (state == S_RD) begin
      if (is_iload && q_tag != TAG_FULL && cell_avail) begin
        sm_tag[addr]  <= TAG_DEFERRED;
        sm_data[addr] <= WORD_W'(cell_idx);
        cells[cell_idx] <= '{node: req.w[0][WORD_W-1 -: NODE_W], fba: req.w[0][FBA_W-1:0],
                             off: req.hdr.off, disp: req.hdr.disp,
                             has_next: (q_tag == TAG_DEFERRED), next: q_data[DW-1:0]};
      end else if (is_istore) begin
        sm_tag[addr]  <= TAG_FULL;
        sm_data[addr] <= req.w[1];
      end
    end
    if (state == S_CLR) begin
      sm_tag[clr_addr]  <= TAG_EMPTY;
      sm_data[clr_addr] <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      req        <= '0;
      reply      <= '0;
      cur        <= '0;
      clr_addr   <= '0;
      clr_end    <= '0;
      err_istore <= 1'b0;
      err_alloc  <= 1'b0;
      err_defer  <= 1'b0;
      err_msg    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (!in_empty) begin
            req <= in_rdata;
            unique case (in_rdata.hdr.mt)
              MT_ILOAD, MT_ISTORE, MT_ISTORER: state <= S_RD;
              MT_HALLOC:   state <= S_HALLOC;
              MT_HDEALLOC: state <= S_IDLE;
              default:     err_msg <= 1'b1;
            endcase
          end
        end
        S_RD: begin
          if (is_iload) begin
            if (q_tag == TAG_FULL) begin
              reply <= mk_start(MT_START, req.w[0][WORD_W-1 -: NODE_W], req.w[0][FBA_W-1:0],
                                req.hdr.off, req.hdr.disp, q_data);
              state <= S_SEND;
            end else begin
              if (!cell_avail) err_defer <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            if (q_tag == TAG_FULL) err_istore <= 1'b1;
            reply <= mk_start(MT_STARTN, req.w[0][WORD_W-1 -: NODE_W], req.w[0][FBA_W-1:0],
                              req.hdr.off, '0, '0);
            if (q_tag == TAG_DEFERRED) begin
              cur   <= q_data[DW-1:0];
              state <= S_WSEND;
            end else begin
              state <= (req.hdr.mt == MT_ISTORE) ? S_SEND : S_IDLE;
            end
          end
        end
        S_WSEND: begin
          if (!out_full) begin
            if (cells[cur].has_next) cur <= cells[cur].next;
            else state <= (req.hdr.mt == MT_ISTORE) ? S_SEND : S_IDLE;
          end
        end
        S_HALLOC: begin
          if (halloc_ok) begin
            clr_addr <= {blk_idx, {BLK_LOG{1'b0}}};
            clr_end  <= {blk_idx, {BLK_LOG{1'b0}}} + SM_AW'(req.w[1] - 1);
            reply    <= mk_start(MT_START, req.w[0][WORD_W-1 -: NODE_W], req.w[0][FBA_W-1:0],
                                 req.hdr.off, req.hdr.disp,
                                 {cluster_id, 2'b00, FBA_W'({blk_idx, {BLK_LOG{1'b0}}})});
            state    <= S_CLR;
          end else begin
            err_alloc <= 1'b1;
            reply     <= mk_start(MT_START, req.w[0][WORD_W-1 -: NODE_W], req.w[0][FBA_W-1:0],
                                  req.hdr.off, req.hdr.disp, '1);
            state     <= S_SEND;
          end
        end
        S_CLR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == clr_end) state <= S_SEND;
        end
        S_SEND: begin
          if (!out_full) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
