// tage_predictor: TAGE-style predicate predictor with a confidence output.
//
// One untagged base table of 2-bit counters indexed by PC, plus NT tagged
// tables of 2^TLOG entries, each entry holding a 3-bit signed-style counter
// (>= 4 means "true"), a TAG_W-bit partial tag and a 2-bit useful counter.
// Table i is indexed and tagged with a hash of the PC and of the newest
// TAGE_HLEN[i] bits of the global history (geometric lengths, 4 .. 640).
// The prediction comes from the hitting table with the longest history
// (the provider); the next hit, or the base table, gives the alternate.
//
// Two ports:
//  * predict (combinational): pc + speculative history -> pred, high_conf.
//    high_conf is set when the provider counter is saturated, the
//    storage-free confidence estimate used by the branch-history predictor
//    with the high-confidence filter.
//  * update (combinational lookup, write at the clock edge): pc +
//    non-speculative history + actual predicate.  upd_pred is the prediction
//    this port computes, used at commit to count mispredictions.  Training:
//    the provider counter moves toward the outcome; its useful counter
//    moves when provider and alternate disagree; on a misprediction one
//    entry with u == 0 is allocated in the first longer table, or, if none
//    is free, the useful counters of the longer tables are decremented.
//
// The document derives the predictor from TAGE and gives its budget
// (1 + 12 components, about 15K entries); the hash functions, entry fields,
// allocation policy and confidence rule are this design's, taken from the
// usual TAGE organisation.  Defaults: 3072 base + 12 x 1024 tagged =
// 15,360 entries.  No periodic useful-counter reset is implemented.
// Reset initialises all counters to weak values and all tags to zero.
module tage_predictor
  import sprepi_pkg::*;
#(
  parameter int NT           = TAGE_NT,
  parameter int TLOG         = 10,
  parameter int TAG_W        = 9,
  parameter int BASE_ENTRIES = 3072,
  parameter int BLOG         = 12     // ceil(log2(BASE_ENTRIES))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // predict port
  input  logic [31:0]             pc,
  input  logic [TAGE_MAXHIST-1:0] hist,
  output logic                    pred,
  output logic                    high_conf,
  // update port
  input  logic                    upd_v,
  input  logic [31:0]             upd_pc,
  input  logic [TAGE_MAXHIST-1:0] upd_hist,
  input  logic                    upd_taken,
  output logic                    upd_pred
);
  localparam int TSIZE = 1 << TLOG;

  typedef struct packed {
    logic [NT-1:0]             hit;
    logic [NT-1:0][TLOG-1:0]   idx;
    logic [NT-1:0][TAG_W-1:0]  tag;
    logic [BLOG-1:0]           bidx;
    int                        prov;   // -1: base table
    logic                      pred;
    logic                      alt;
    logic                      conf;
  } look_t;

  logic [2:0]       tctr [NT][TSIZE];
  logic [TAG_W-1:0] ttag [NT][TSIZE];
  logic [1:0]       tu   [NT][TSIZE];
  logic [1:0]       bctr [BASE_ENTRIES];

  // XOR-fold the newest len bits of h into n bits.
  function automatic logic [31:0] fold(input logic [TAGE_MAXHIST-1:0] h,
                                       input int len, input int n);
    logic [31:0] f;
    f = '0;
    for (int b = 0; b < TAGE_MAXHIST; b++)
      if (b < len) f[b % n] = f[b % n] ^ h[b];
    return f;
  endfunction

  function automatic look_t lookup(input logic [31:0] p,
                                   input logic [TAGE_MAXHIST-1:0] h);
    look_t l;
    logic [BLOG-1:0] bh;
    logic found;
    l = '0;
    for (int i = 0; i < NT; i++) begin
      l.idx[i] = p[TLOG+1:2] ^ p[2*TLOG+1:TLOG+2] ^ TLOG'(fold(h, TAGE_HLEN[i], TLOG))
                 ^ TLOG'(i);
      l.tag[i] = p[TAG_W+1:2] ^ TAG_W'(fold(h, TAGE_HLEN[i], TAG_W))
                 ^ TAG_W'(fold(h, TAGE_HLEN[i], TAG_W - 1) << 1);
      l.hit[i] = (ttag[i][l.idx[i]] == l.tag[i]);
    end
    bh = p[BLOG+1:2];
    l.bidx = (int'(bh) >= BASE_ENTRIES) ? BLOG'(int'(bh) - ((1 << BLOG) - BASE_ENTRIES)) : bh;
    l.prov = -1;
    l.pred = bctr[l.bidx][1];
    l.alt  = bctr[l.bidx][1];
    l.conf = (bctr[l.bidx] == 2'd0) || (bctr[l.bidx] == 2'd3);
    found  = 1'b0;
    for (int i = NT - 1; i >= 0; i--) begin
      if (l.hit[i]) begin
        if (!found) begin
          found  = 1'b1;
          l.prov = i;
          l.pred = tctr[i][l.idx[i]][2];
          l.conf = (tctr[i][l.idx[i]] == 3'd0) || (tctr[i][l.idx[i]] == 3'd7);
        end
      end
    end
    // alternate: longest hit strictly shorter than the provider
    if (l.prov > 0) begin
      logic got;
      got = 1'b0;
      for (int i = NT - 1; i >= 0; i--)
        if (i < l.prov && l.hit[i] && !got) begin
          got   = 1'b1;
          l.alt = tctr[i][l.idx[i]][2];
        end
    end
    return l;
  endfunction

  look_t pl, ul;

  always_comb begin
    pl        = lookup(pc, hist);
    pred      = pl.pred;
    high_conf = pl.conf;
    ul        = lookup(upd_pc, upd_hist);
    upd_pred  = ul.pred;
  end

  // Training decisions for the update port.
  logic [NT-1:0]      ctr_en, tag_en, u_en;
  logic [NT-1:0][2:0] ctr_nv;
  logic [NT-1:0][1:0] u_nv;
  logic               b_en;
  logic [1:0]         b_nv;

  always_comb begin
    logic [2:0] c;
    logic [1:0] u;
    logic       alloc_done;
    ctr_en = '0; tag_en = '0; u_en = '0; ctr_nv = '0; u_nv = '0;
    b_en = 1'b0; b_nv = bctr[ul.bidx];
    alloc_done = 1'b0;
    c = '0;
    u = '0;
    if (upd_v) begin
      if (ul.prov >= 0) begin
        c = tctr[ul.prov][ul.idx[ul.prov]];
        ctr_en[ul.prov] = 1'b1;
        ctr_nv[ul.prov] = upd_taken ? ((c == 3'd7) ? c : c + 3'd1)
                                    : ((c == 3'd0) ? c : c - 3'd1);
        if (ul.pred != ul.alt) begin
          u = tu[ul.prov][ul.idx[ul.prov]];
          u_en[ul.prov] = 1'b1;
          u_nv[ul.prov] = (ul.pred == upd_taken) ? ((u == 2'd3) ? u : u + 2'd1)
                                                 : ((u == 2'd0) ? u : u - 2'd1);
        end
      end else begin
        b_en = 1'b1;
        b_nv = upd_taken ? ((bctr[ul.bidx] == 2'd3) ? 2'd3 : bctr[ul.bidx] + 2'd1)
                         : ((bctr[ul.bidx] == 2'd0) ? 2'd0 : bctr[ul.bidx] - 2'd1);
      end
      if (ul.pred != upd_taken) begin
        for (int i = 0; i < NT; i++)
          if (i > ul.prov && !alloc_done && tu[i][ul.idx[i]] == 2'd0) begin
            alloc_done = 1'b1;
            tag_en[i]  = 1'b1;
            ctr_en[i]  = 1'b1;
            ctr_nv[i]  = upd_taken ? 3'd4 : 3'd3;
            u_en[i]    = 1'b1;
            u_nv[i]    = 2'd0;
          end
        if (!alloc_done)
          for (int i = 0; i < NT; i++)
            if (i > ul.prov) begin
              u_en[i] = 1'b1;
              u_nv[i] = (tu[i][ul.idx[i]] == 2'd0) ? 2'd0 : tu[i][ul.idx[i]] - 2'd1;
            end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++)
        for (int e = 0; e < TSIZE; e++) begin
          tctr[i][e] <= 3'd4;
          ttag[i][e] <= '0;
          tu[i][e]   <= '0;
        end
      for (int e = 0; e < BASE_ENTRIES; e++) bctr[e] <= 2'd2;
    end else begin
      for (int i = 0; i < NT; i++) begin
        if (ctr_en[i]) tctr[i][ul.idx[i]] <= ctr_nv[i];
        if (tag_en[i]) ttag[i][ul.idx[i]] <= ul.tag[i];
        if (u_en[i])   tu[i][ul.idx[i]]   <= u_nv[i];
      end
      if (b_en) bctr[ul.bidx] <= b_nv;
    end
  end
endmodule
