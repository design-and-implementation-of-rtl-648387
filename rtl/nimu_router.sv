// nimu_router -- message router of the NIMU.
//
// Every message that leaves a node passes through the NIMU, which decides
// where it goes from its header alone:
//
//   SM message (ILOAD, ISTORE, ...) for this cluster   -> the SM handler
//   SM message for another cluster                     -> the network
//   HOST_OUT1/2                                        -> the host port
//   FALLOC / M_FALLOC (no node named)                  -> ITQ of the least
//                                                          loaded node (nimu_lb)
//   any other message for a node of this cluster       -> that node's ITQ
//   any other message                                  -> the network
//
// An allocation adds its size (w[0]) to the chosen node's load; a frame
// deallocation for a local node subtracts its size (w[0]).
//
// Sources are the answers of the SM handler, the NNODES ETQs and the network
// input. One message moves per cycle. A message is taken from its source only
// in a cycle where its destination can accept it, so a blocked destination
// never holds up messages for other destinations and the SM handler can
// always drain its answers. The SM answers go first; the ETQs and the network
// share the rest round-robin. These arbitration rules are this design's
// choices; the routing rules are the document's, with the load balancing
// limited to the nodes of the cluster.
//
// Network and host ports use a valid/ready handshake: a message moves in a
// cycle where both are high. Queue ports are FIFO push/pop ports.
module nimu_router
  import davrid_pkg::*;
#(
  parameter int unsigned NNODES = 4,
  parameter int unsigned LB_W   = FBA_W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  // ETQs of the nodes (delete side)
  input  msg_t                 etq_rdata [NNODES],
  input  logic [NNODES-1:0]    etq_empty,
  output logic [NNODES-1:0]    etq_pop,
  // ITQs of the nodes (insert side); data is common
  output logic [NNODES-1:0]    itq_push,
  output msg_t                 itq_wdata,
  input  logic [NNODES-1:0]    itq_full,
  // SM handler
  output logic                 sm_push,
  output msg_t                 sm_wdata,
  input  logic                 sm_full,
  input  msg_t                 smr_rdata,
  input  logic                 smr_empty,
  output logic                 smr_pop,
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
  // load table, for observation
  output logic [LB_W-1:0]      load [NNODES]
);
  localparam int unsigned NSRC = NNODES + 1;          // ETQs, then network
  localparam int unsigned SW   = $clog2(NSRC);
  localparam int unsigned NW   = $clog2(NNODES);

  typedef enum logic [1:0] {D_ITQ, D_SM, D_NET, D_HOST} dest_e;

  logic [NW-1:0] lb_pick;

  // where a message goes, and whether it can go now
  function automatic dest_e dest_of(msg_t m, logic [CLUSTER_W-1:0] cid);
    if (is_sm_msg(m.hdr.mt))            return (cluster_of(m.hdr.node) == cid) ? D_SM : D_NET;
    else if (is_host_msg(m.hdr.mt))     return D_HOST;
    else if (is_alloc_msg(m.hdr.mt))    return D_ITQ;
    else if (cluster_of(m.hdr.node) == cid) return D_ITQ;
    else                                return D_NET;
  endfunction

  function automatic logic [NW-1:0] itq_of(msg_t m, logic [NW-1:0] pick);
    return is_alloc_msg(m.hdr.mt) ? pick : NW'(lnode_of(m.hdr.node));
  endfunction

  // source view: index 0..NNODES-1 are ETQs, NNODES is the network
  msg_t            src_msg [NSRC];
  logic [NSRC-1:0] src_valid;
  logic [NSRC-1:0] src_ok;

  function automatic logic can_go(msg_t m, logic [CLUSTER_W-1:0] cid, logic [NW-1:0] pick,
                                  logic [NNODES-1:0] full, logic smf, logic nr, logic hr);
    unique case (dest_of(m, cid))
      D_ITQ:   return !full[itq_of(m, pick)];
      D_SM:    return !smf;
      D_NET:   return nr;
      default: return hr;
    endcase
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < NNODES; i++) begin
      src_msg[i]   = etq_rdata[i];
      src_valid[i] = !etq_empty[i];
    end
    src_msg[NNODES]   = net_in_data;
    src_valid[NNODES] = net_in_valid;
    for (int unsigned i = 0; i < NSRC; i++)
      src_ok[i] = src_valid[i] &&
                  can_go(src_msg[i], cluster_id, lb_pick, itq_full, sm_full, net_out_ready, host_ready);
  end

  // arbitration
  logic [SW-1:0] rr;          // first source to consider
  logic          sel_valid;   // a message moves this cycle
  logic          sel_smr;     // it is an SM answer
  logic [SW-1:0] sel_src;
  msg_t          sel_msg;
  logic          smr_ok;

  assign smr_ok = !smr_empty &&
                  can_go(smr_rdata, cluster_id, lb_pick, itq_full, sm_full, net_out_ready, host_ready);

  always_comb begin
    logic [SW:0] idx;
    sel_valid = 1'b0;
    sel_smr   = 1'b0;
    sel_src   = '0;
    idx       = '0;
    if (smr_ok) begin
      sel_valid = 1'b1;
      sel_smr   = 1'b1;
    end else begin
      for (int unsigned k = 0; k < NSRC; k++) begin
        idx = (SW+1)'(rr) + (SW+1)'(k);
        if (idx >= (SW+1)'(NSRC)) idx = idx - (SW+1)'(NSRC);
        if (!sel_valid && src_ok[idx[SW-1:0]]) begin
          sel_valid = 1'b1;
          sel_src   = idx[SW-1:0];
        end
      end
    end
  end

  assign sel_msg = sel_smr ? smr_rdata : src_msg[sel_src];

  dest_e sel_dest;
  assign sel_dest = dest_of(sel_msg, cluster_id);

  always_comb begin
    etq_pop       = '0;
    net_in_ready  = 1'b0;
    smr_pop       = 1'b0;
    itq_push      = '0;
    sm_push       = 1'b0;
    net_out_valid = 1'b0;
    host_valid    = 1'b0;
    itq_wdata     = sel_msg;
    sm_wdata      = sel_msg;
    net_out_data  = sel_msg;
    host_data     = sel_msg;
    if (sel_valid) begin
      if (sel_smr)                    smr_pop = 1'b1;
      else if (sel_src == SW'(NNODES)) net_in_ready = 1'b1;
      else                            etq_pop[sel_src[NW-1:0]] = 1'b1;
      unique case (sel_dest)
        D_ITQ:   itq_push[itq_of(sel_msg, lb_pick)] = 1'b1;
        D_SM:    sm_push       = 1'b1;
        D_NET:   net_out_valid = 1'b1;
        default: host_valid    = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (sel_valid && !sel_smr) rr <= (sel_src == SW'(NSRC - 1)) ? '0 : sel_src + 1'b1;
  end

  // load balancing table
  logic lb_alloc, lb_dealloc;
  assign lb_alloc   = sel_valid && (sel_dest == D_ITQ) && is_alloc_msg(sel_msg.hdr.mt);
  assign lb_dealloc = sel_valid && (sel_dest == D_ITQ) && is_dealloc_msg(sel_msg.hdr.mt);

  nimu_lb #(.NNODES(NNODES), .CW(LB_W)) u_lb (
    .clk, .rst_n,
    .alloc(lb_alloc), .alloc_node(lb_pick), .alloc_size(LB_W'(sel_msg.w[0])),
    .dealloc(lb_dealloc), .dealloc_node(NW'(lnode_of(sel_msg.hdr.node))),
    .dealloc_size(LB_W'(sel_msg.w[0])),
    .pick(lb_pick), .load
  );
endmodule
