// ortho_decoder: nearest-code-word decoder with error count and resend
// request (the "Decoder / Mapping" block of the receiver).
//
// The decoder holds a lookup table of all NC = 2**A code words, entry i being
// the code of data value i (the same mapping as ortho_encoder). A `start`
// pulse while idle latches the decrypted word r_ortho. The decoder then
// visits one table entry per clock cycle: it XORs the latched word with the
// entry and counts the ones of the result, which is the number of bit
// positions in which they differ. It keeps the smallest count seen, the index
// of the entry that gave it, and whether a later entry gave the same count.
// When all entries are visited, the index of the minimum is the corrected
// data (r_out), the minimum itself is the number of corrected bit errors
// (count), and req goes high if the minimum was shared by more than one
// entry: the word cannot be corrected and the sender should resend it.
// Up to B/4 - 1 errors are always corrected; B/4 errors may raise req.
//
// Timing: start at edge 0 latches the word, edges 1..NC scan the table, and
// edge NC+1 registers r_out, count and req and raises r_valid for one cycle.
// Counted from the edge that completes the received frame (one edge earlier,
// in the receiver's shift register) that is NC + 2 = 2B + 2 cycles, the
// processing time given for the scheme. The table scan, the minimum search
// and req on a tie follow the published description; the one-entry-per-cycle
// schedule is this design's reading of that cycle count. A start pulse while
// busy is ignored (the receiver reports it as an overrun).
//
// Reset is synchronous and active low.
module ortho_decoder
  import ortho_pkg::*;
#(
  parameter int unsigned A  = 5,
  parameter int unsigned B  = 2 ** (A - 1),
  parameter int unsigned CW = $clog2(B + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [B-1:0]  r_ortho,
  output logic [B-1:0]  word,
  output logic          busy,
  output logic          r_valid,
  output logic [A-1:0]  r_out,
  output logic [CW-1:0] count,
  output logic          req
);

  localparam int unsigned NC = 2 ** A;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DONE} state_t;

  // Lookup table of every code word, indexed by data value.
  logic [B-1:0] lut [NC];
  for (genvar i = 0; i < NC; i++) begin : g_lut
    localparam logic [MAX_B-1:0] CODE = ortho_code(A, i);
    assign lut[i] = CODE[B-1:0];
  end

  state_t       state;
  logic [B-1:0] word_q;     // latched decrypted word
  logic [A-1:0] idx;        // table entry being compared
  logic [A-1:0] best;       // entry with the smallest count so far
  logic [CW-1:0] min_cnt;   // smallest count so far
  logic         tie;        // smallest count reached by more than one entry
  logic [CW-1:0] ones;      // ones in word_q ^ lut[idx]

  always_comb begin
    logic [B-1:0] diff;
    diff = word_q ^ lut[idx];
    ones = '0;
    for (int unsigned k = 0; k < B; k++) ones = ones + CW'(diff[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      word_q  <= '0;
      idx     <= '0;
      best    <= '0;
      min_cnt <= '0;
      tie     <= 1'b0;
      r_valid <= 1'b0;
      r_out   <= '0;
      count   <= '0;
      req     <= 1'b0;
    end else begin
      r_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            word_q  <= r_ortho;
            idx     <= '0;
            min_cnt <= CW'(B);
            best    <= '0;
            tie     <= 1'b0;
            state   <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (ones < min_cnt) begin
            min_cnt <= ones;
            best    <= idx;
            tie     <= 1'b0;
          end else if (ones == min_cnt) begin
            tie <= 1'b1;
          end
          idx <= idx + 1'b1;
          if (idx == A'(NC - 1)) state <= S_DONE;
        end
        S_DONE: begin
          r_out   <= best;
          count   <= min_cnt;
          req     <= tie;
          r_valid <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Results are announced once per decoded word, never twice in a row.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n) r_valid |=> !r_valid);
  // The scan index stays at zero while idle, so every scan starts at entry 0.
  a_idle_idx: assert property (@(posedge clk) disable iff (!rst_n) state == S_IDLE |-> idx == '0);
  assign word = word_q;

endmodule
