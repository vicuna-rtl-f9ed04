// Two-way set-associative cache with two request ports and LRU replacement.
//
// Used as the data cache shared by the main core and the vector
// coprocessor (port 0: vector load/store unit, port 1: main core), and,
// with port 0 unused, as the instruction cache. Port 0 always takes
// precedence: when both ports request in the same cycle, port 0 is served
// and port 1 waits.
//
// How it works: one request is handled at a time. A read hit completes in
// the cycle it is presented (done with the data). A read miss fetches the
// whole line from memory, LINE_B / 4 word reads sent back to back, into the
// least recently used way of the set, and the request then completes as a
// hit. Writes are written through to memory without allocation: a write
// updates the cached copy if the line is present and completes when memory
// acknowledges it. Each set has one LRU bit naming the way to replace next.
//
// Ordering with the vector core: every memory transaction is offered to the
// memory arbiter with a flag telling whether it comes from port 1 (the main
// core). The arbiter refuses such a transaction while vector loads or stores
// are pending; the cache then drops the attempt and stays free, so the
// vector unit's requests keep being served and the main core's access is
// retried. Once a transaction has started it runs to completion.
//
// Port protocol: req/we/addr/wdata/be held until done (single-cycle pulse);
// rdata is valid with done. Memory side: one 32-bit word per beat,
// m_req_o held until m_gnt_i; m_last_o marks the last beat of a
// transaction; every beat, read or write, is answered by one m_rvalid_i, in
// order.
//
// The two ways, LRU replacement and vector precedence follow the document
// (Table 2 gives 128 kB for the fast configuration's data cache). Line size,
// write-through without allocation and the instruction-cache size are not
// given there and are this design's choices.
module cache #(
  parameter int unsigned SIZE_B = 128 * 1024,  // total capacity in bytes
  parameter int unsigned LINE_B = 32           // line size in bytes
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // request ports, index 0 has precedence
  input  logic [1:0]       req_i,
  input  logic [1:0]       we_i,
  input  logic [1:0][31:0] addr_i,
  input  logic [1:0][31:0] wdata_i,
  input  logic [1:0][3:0]  be_i,
  output logic [1:0]       done_o,
  output logic [31:0]      rdata_o,
  output logic             miss_o,      // a line fill starts this cycle
  // memory side (to the memory arbiter)
  output logic        m_req_o,
  output logic        m_we_o,
  output logic [31:0] m_addr_o,
  output logic [31:0] m_wdata_o,
  output logic [3:0]  m_be_o,
  output logic        m_scalar_o,
  output logic        m_last_o,
  input  logic        m_gnt_i,
  input  logic        m_rvalid_i,
  input  logic [31:0] m_rdata_i
);

  localparam int unsigned WAYS  = 2;
  localparam int unsigned LW    = LINE_B / 4;              // words per line
  localparam int unsigned SETS  = SIZE_B / (WAYS * LINE_B);
  localparam int unsigned OFFW  = $clog2(LINE_B);
  localparam int unsigned IDXW  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WOFFW = (LW > 1) ? $clog2(LW) : 1;
  localparam int unsigned TAGW  = 32 - OFFW - IDXW;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_WWAIT} state_e;

  logic [31:0]     data_q [WAYS][SETS * LW];
  logic [TAGW-1:0] tag_q  [WAYS][SETS];
  logic [WAYS-1:0] valid_q [SETS];
  logic            lru_q  [SETS];

  state_e          state_q;
  logic            port_q;       // port being served by a fill / write
  logic [31:0]     maddr_q;      // line base (fill) or word address (write)
  logic [31:0]     mwdata_q;
  logic [3:0]      mbe_q;
  logic            victim_q;
  logic [WOFFW:0]  sent_q, recv_q;

  // request selection and lookup
  logic            sel;
  logic            any_req;
  logic [31:0]     a;
  logic [IDXW-1:0] idx;
  logic [TAGW-1:0] tag;
  logic [WOFFW-1:0] woff;
  logic [WAYS-1:0] way_hit;
  logic            hit, hit_way;

  assign any_req = |req_i;
  assign sel     = !req_i[0];
  assign a       = addr_i[sel];
  assign idx     = a[OFFW +: IDXW];
  assign tag     = a[31 -: TAGW];
  assign woff    = a[2 +: WOFFW];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      way_hit[w] = valid_q[idx][w] && (tag_q[w][idx] == tag);
    end
    hit     = |way_hit;
    hit_way = way_hit[1];
  end

  logic [IDXW-1:0] fidx;
  assign fidx = maddr_q[OFFW +: IDXW];

  // memory side and port responses
  always_comb begin
    m_req_o    = 1'b0;
    m_we_o     = 1'b0;
    m_addr_o   = '0;
    m_wdata_o  = '0;
    m_be_o     = 4'hF;
    m_scalar_o = sel;
    m_last_o   = 1'b0;
    done_o     = '0;
    rdata_o    = data_q[hit_way][{idx, woff}];
    miss_o     = 1'b0;
    case (state_q)
      S_IDLE: if (any_req) begin
        if (we_i[sel]) begin
          m_req_o   = 1'b1;
          m_we_o    = 1'b1;
          m_addr_o  = {a[31:2], 2'b00};
          m_wdata_o = wdata_i[sel];
          m_be_o    = be_i[sel];
          m_last_o  = 1'b1;
        end else if (hit) begin
          done_o[sel] = 1'b1;
        end else begin
          m_req_o  = 1'b1;
          m_addr_o = {a[31:OFFW], OFFW'(0)};
          m_last_o = (LW == 1);
          miss_o   = m_gnt_i;
        end
      end
      S_FILL: begin
        m_scalar_o = port_q;
        if (32'(sent_q) < LW) begin
          m_req_o  = 1'b1;
          m_addr_o = maddr_q + 32'(sent_q) * 4;
          m_last_o = (32'(sent_q) == LW - 1);
        end
      end
      S_WWAIT: begin
        m_scalar_o  = port_q;
        done_o[port_q] = m_rvalid_i;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= S_IDLE;
      port_q   <= 1'b0;
      maddr_q  <= '0;
      mwdata_q <= '0;
      mbe_q    <= '0;
      victim_q <= 1'b0;
      sent_q   <= '0;
      recv_q   <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        lru_q[s]   <= 1'b0;
      end
    end else begin
      case (state_q)
        S_IDLE: if (any_req) begin
          if (we_i[sel]) begin
            if (m_gnt_i) begin
              port_q   <= sel;
              maddr_q  <= a;
              mwdata_q <= wdata_i[sel];
              mbe_q    <= be_i[sel];
              state_q  <= S_WWAIT;
            end
          end else if (hit) begin
            lru_q[idx] <= !hit_way;
          end else if (m_gnt_i) begin
            port_q   <= sel;
            maddr_q  <= {a[31:OFFW], OFFW'(0)};
            victim_q <= lru_q[idx];
            sent_q   <= 1;
            recv_q   <= '0;
            // the victim line is invalid until the fill completes
            valid_q[idx][lru_q[idx]] <= 1'b0;
            state_q  <= S_FILL;
          end
        end
        S_FILL: begin
          if (m_req_o && m_gnt_i) begin
            sent_q <= sent_q + 1'b1;
          end
          if (m_rvalid_i) begin
            recv_q <= recv_q + 1'b1;
            if (32'(recv_q) == LW - 1) begin
              tag_q[victim_q][fidx]   <= maddr_q[31 -: TAGW];
              valid_q[fidx][victim_q] <= 1'b1;
              state_q                 <= S_IDLE;
            end
          end
        end
        S_WWAIT: if (m_rvalid_i) begin
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // data array: line fill words and write hits
  logic [IDXW-1:0]  widx;
  logic [TAGW-1:0]  wtag;
  logic [WOFFW-1:0] wwoff;
  assign widx  = maddr_q[OFFW +: IDXW];
  assign wtag  = maddr_q[31 -: TAGW];
  assign wwoff = maddr_q[2 +: WOFFW];

  always_ff @(posedge clk_i) begin
    if (state_q == S_FILL && m_rvalid_i) begin
      data_q[victim_q][{fidx, recv_q[WOFFW-1:0]}] <= m_rdata_i;
    end
    if (state_q == S_WWAIT && m_rvalid_i) begin
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[widx][w] && tag_q[w][widx] == wtag) begin
          for (int b = 0; b < 4; b++) begin
            if (mbe_q[b]) data_q[w][{widx, wwoff}][8*b +: 8] <= mwdata_q[8*b +: 8];
          end
        end
      end
    end
  end

endmodule
