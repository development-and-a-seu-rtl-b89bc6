// bist_ctrl: built-in self test of the buffer memories.
//
// Runs a 13N march test over one memory: five march elements, 13 accesses
// per word in all,
//   up (w0); up (r0,w1,r1); up (r1,w0,r0); down (r0,w1,r1); down (r1,w0,r0)
// where "0" is the background word of the address and "1" its complement.
// Two kinds are selectable: pattern 0 uses an all-zero background, pattern
// 1 a checkerboard (odd bits set on even addresses, even bits on odd ones). Every
// word read is compressed into a 36-bit signature register (a multiple-input
// LFSR, x^36 + x^11 + 1, Galois form), so one wrong bit anywhere changes the
// final value; a read that differs from the expected word also sets fail.
// The sequence can be stopped before any element (stop_elem, 7 = never) and
// continued with resume; stopping before element 2 leaves all words at "1",
// so the memory can sit in that state (for example under irradiation) and
// the rest of the test then shows any bit that flipped.
//
// Following the document: two kinds of 13N march pattern, a 36-bit LFSR
// signature, BIST of the L1 buffer and FIFOs, stepping the sequence. This
// design's own: the exact march elements and backgrounds, the polynomial,
// the stop/resume controls. Timing: one access per clock; a read's data is
// taken one clock later; a full run takes 13*(last_addr+1)+1 clocks.
module bist_ctrl #(
  parameter int unsigned W  = 36,
  parameter int unsigned AW = 8,
  parameter logic [W-1:0] POLY = W'((64'd1 << 11) | 64'd1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          resume,
  input  logic          pattern,
  input  logic [2:0]    stop_elem,
  input  logic [AW-1:0] last_addr,
  input  logic [W-1:0]  data_mask,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata,
  output logic          busy,
  output logic          done,
  output logic          fail,
  output logic          paused,
  output logic [2:0]    elem,
  output logic [W-1:0]  signature
);
  typedef enum logic [1:0] {B_IDLE, B_RUN, B_PAUSE, B_FLUSH} st_e;
  st_e         st;
  logic [1:0]  op;
  logic [AW-1:0] addr;
  logic        rd_pend;
  logic [W-1:0] rd_exp;

  logic        is_wr, val, last_op, last_addr_hit, down;
  logic [W-1:0] bg, word;

  always_comb begin
    // op table of the current element
    is_wr = 1'b0; val = 1'b0; last_op = 1'b0;
    case (elem)
      3'd0: begin is_wr = 1'b1; val = 1'b0; last_op = 1'b1; end
      3'd1, 3'd3: begin is_wr = (op == 2'd1); val = (op != 2'd0); last_op = (op == 2'd2); end
      default: begin is_wr = (op == 2'd1); val = (op == 2'd0); last_op = (op == 2'd2); end
    endcase
    down = (elem >= 3'd3);
    last_addr_hit = down ? (addr == '0) : (addr == last_addr);
    for (int i = 0; i < W; i++) bg[i] = pattern & (addr[0] ^ i[0]);
    word = (val ? ~bg : bg) & data_mask;
  end

  assign mem_en    = (st != B_IDLE);
  assign mem_we    = (st == B_RUN) && is_wr;
  assign mem_addr  = addr;
  assign mem_wdata = word;
  assign busy      = (st != B_IDLE);
  assign paused    = (st == B_PAUSE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; op <= '0; addr <= '0; elem <= '0; rd_pend <= 1'b0;
      rd_exp <= '0; done <= 1'b0; fail <= 1'b0; signature <= '0;
    end else begin
      rd_pend <= (st == B_RUN) && !is_wr;
      rd_exp  <= word;
      if (rd_pend) begin
        signature <= {signature[W-2:0], 1'b0} ^ (signature[W-1] ? POLY : '0)
                     ^ (mem_rdata & data_mask);
        if ((mem_rdata & data_mask) != rd_exp) fail <= 1'b1;
      end
      case (st)
        B_IDLE: if (start) begin
          elem <= '0; op <= '0; addr <= '0; done <= 1'b0; fail <= 1'b0;
          signature <= '0;
          st <= (stop_elem == 3'd0) ? B_PAUSE : B_RUN;
        end
        B_PAUSE: if (resume) st <= B_RUN;
        B_RUN: begin
          if (!last_op) op <= op + 1'b1;
          else begin
            op <= '0;
            if (!last_addr_hit) addr <= down ? addr - 1'b1 : addr + 1'b1;
            else if (elem == 3'd4) st <= B_FLUSH;
            else begin
              elem <= elem + 1'b1;
              addr <= (elem + 3'd1 >= 3'd3) ? last_addr : '0;
              if (stop_elem == elem + 3'd1) st <= B_PAUSE;
            end
          end
        end
        B_FLUSH: begin   // last read's data is taken this cycle
          st <= B_IDLE; done <= 1'b1;
        end
      endcase
    end
  end
endmodule
