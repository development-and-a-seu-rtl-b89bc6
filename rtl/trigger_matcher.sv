// trigger_matcher: finds the hits that belong to each trigger and builds
// the event packets in the read-out FIFO.
//
// For a trigger with time tag T (bunch units) the match window is
// [T - latency, T - latency + window). The matcher waits until the current
// bunch count has passed the window end by the search margin, so hits that
// reached the L1 buffer late (channel buffers, arbitration) are there, then
// writes a header, scans the L1 buffer from the release pointer (base)
// towards the write pointer and copies each hit inside the window as a data
// word, and ends the event with a trailer holding the word count. The scan
// stops at the write pointer or at the first hit later than window end plus
// search margin. Hits at the start of the buffer that are older than the
// window start minus the reject margin can match no later trigger and are
// released by advancing base. With no trigger pending (trigger FIFO empty),
// the word at base is released once it is older than latency plus reject
// margin: no trigger still to come can claim it, and the buffer does not
// fill with hits that no trigger wants.
//
// Whenever an error flag rises, an error word with all flags is written
// before the next event. A full read-out FIFO stalls the matcher.
//
// Following the document: time match between trigger time tag from the
// trigger FIFO and hit times from the randomly read L1 buffer, matched hits
// to the read-out FIFO. This design's own: window/margin parameters, packet
// format (amt_pkg), the scan order and release rule. Time differences are
// taken modulo 2^12 bunches and must stay under 2^11 (51 us).
// Timing: two cycles per L1 word examined (synchronous read); a push to
// the read-out FIFO is at least two cycles after the previous one, so
// ro_full can be the FIFO's own full flag.
module trigger_matcher
  import amt_pkg::*;
#(
  parameter int unsigned AW = $clog2(L1_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [BC_BITS-1:0]  cur_bc,
  input  logic [BC_BITS-1:0]  cfg_window,
  input  logic [BC_BITS-1:0]  cfg_latency,
  input  logic [BC_BITS-1:0]  cfg_search,
  input  logic [BC_BITS-1:0]  cfg_reject,
  // trigger FIFO
  input  logic                trg_valid,
  input  logic [BC_BITS-1:0]  trg_bc,
  input  logic [BC_BITS-1:0]  trg_evid,
  output logic                trg_pop,
  // L1 buffer
  input  logic [AW:0]         l1_wp,
  output logic [AW:0]         l1_base,
  output logic [AW-1:0]       l1_rd_addr,
  input  hit_t                l1_rd_hit,
  input  logic                l1_rd_parity_err,
  // errors
  input  logic [11:0]         err_flags,
  // read-out FIFO
  output logic                ro_push,
  output logic [RO_WIDTH-1:0] ro_data,
  input  logic                ro_full,
  // monitoring
  output logic                busy,
  output logic                l1_parity_err
);
  typedef enum logic [3:0] {
    S_IDLE, S_AGE, S_AGE2, S_WAIT, S_HEADER, S_READ, S_CHECK, S_TRAILER, S_ERROR
  } state_e;

  state_e              state;
  logic [AW:0]         ptr;
  logic [BC_BITS-1:0]  ws;      // window start
  logic [7:0]          nwords;
  logic [11:0]         err_seen;

  logic signed [BC_BITS-1:0] wait_d, hit_d, age_d;
  logic [BC_BITS-1:0] hit_bc;
  logic               new_err;

  assign hit_bc  = l1_rd_hit.t[TIME_BITS-1 -: BC_BITS];
  assign wait_d  = $signed(cur_bc - (trg_bc - cfg_latency + cfg_window));
  assign hit_d   = $signed(hit_bc - ws);
  assign age_d   = $signed(cur_bc - hit_bc);
  assign new_err = |(err_flags & ~err_seen);

  function automatic logic [RO_WIDTH-1:0] data_word(input hit_t h);
    logic [7:0] w8;
    w8 = (h.width > 10'd255) ? 8'hFF : h.width[7:0];
    case (h.kind)
      HIT_PAIR:  return {RO_PAIR, h.chan, w8, h.t[14:0]};
      HIT_TRAIL: return {RO_TRAIL, h.chan, h.err, 5'h0, h.t};
      default:   return {RO_LEAD, h.chan, h.err, 5'h0, h.t};
    endcase
  endfunction

  assign l1_rd_addr = ptr[AW-1:0];
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ptr <= '0; l1_base <= '0; ws <= '0; nwords <= '0;
      err_seen <= '0; ro_push <= 1'b0; ro_data <= '0; trg_pop <= 1'b0;
      l1_parity_err <= 1'b0;
    end else begin
      ro_push <= 1'b0;
      trg_pop <= 1'b0;
      l1_parity_err <= 1'b0;
      err_seen <= err_seen & err_flags;   // a cleared flag may rise again
      case (state)
        S_IDLE: begin
          if (new_err) begin
            state <= S_ERROR;
          end else if (enable && trg_valid && !trg_pop) begin
            ws    <= trg_bc - cfg_latency;
            state <= S_WAIT;
          end else if (!trg_valid && !trg_pop && l1_base != l1_wp) begin
            ptr   <= l1_base;        // age check of the oldest hit
            state <= S_AGE;
          end
        end
        S_AGE: state <= S_AGE2;   // read of the word at base
        S_AGE2: begin
          if (age_d > $signed(cfg_latency + cfg_reject)) l1_base <= l1_base + 1'b1;
          state <= S_IDLE;
        end
        S_ERROR: if (!ro_full) begin
          ro_push  <= 1'b1;
          ro_data  <= {RO_ERROR, 16'h0, err_flags};
          err_seen <= err_flags;
          state    <= S_IDLE;
        end
        S_WAIT: if (wait_d > $signed(cfg_search)) state <= S_HEADER;
        S_HEADER: if (!ro_full) begin
          ro_push <= 1'b1;
          ro_data <= {RO_HEADER, trg_evid, trg_bc, 4'h0};
          nwords  <= 8'd1;
          ptr     <= l1_base;
          state   <= S_READ;
        end
        S_READ: state <= (ptr == l1_wp) ? S_TRAILER : S_CHECK;
        S_CHECK: begin
          l1_parity_err <= l1_rd_parity_err;
          if (hit_d < 0) begin
            if (hit_d < -$signed(cfg_reject) && ptr == l1_base) l1_base <= l1_base + 1'b1;
            ptr   <= ptr + 1'b1;
            state <= S_READ;
          end else if (hit_d < $signed(cfg_window)) begin
            if (!ro_full) begin
              ro_push <= 1'b1;
              ro_data <= data_word(l1_rd_hit);
              nwords  <= nwords + 1'b1;
              ptr     <= ptr + 1'b1;
              state   <= S_READ;
            end else begin
              l1_parity_err <= 1'b0;  // reported once the word is taken
            end
          end else if (hit_d >= $signed(cfg_window + cfg_search)) begin
            state <= S_TRAILER;
          end else begin
            ptr   <= ptr + 1'b1;
            state <= S_READ;
          end
        end
        S_TRAILER: if (!ro_full) begin
          ro_push <= 1'b1;
          ro_data <= {RO_TRAILER, trg_evid, 8'h00, nwords + 8'd1};
          trg_pop <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
