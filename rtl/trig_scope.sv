// trig_scope: built-in logic analyser for the trigger module's signals.
// Every clock the SIGW-bit sample `sig` is written into a circular buffer
// of DEPTH entries. After `arm`, the scope waits until PRE samples have been
// recorded, then triggers on the first sample that matches the pattern:
// every bit whose `ignore` bit is 0 must equal the `value` bit. It records
// POST more samples and stops, leaving PRE samples before the trigger, the
// trigger sample and POST after it (+/-300 ns at 5 ns with PRE = POST = 60).
// Readout: `rdata` is the current 32-bit word, and a one-cycle `rd` strobe
// steps to the next. Samples come out oldest first, each as
// ceil(SIGW/32) words, least significant word first. `arm` restarts the
// read pointer. status = {29'b0, done, triggered, armed}.
// Pattern triggering, the window and 5 ns resolution follow the document;
// buffer organisation, word order and status bits are this design's own.
module trig_scope #(
  parameter int SIGW  = 103,
  parameter int PRE   = 60,
  parameter int POST  = 60,
  parameter int DEPTH = 128
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [SIGW-1:0] sig,
  input  logic [SIGW-1:0] value,
  input  logic [SIGW-1:0] ignore,
  input  logic            arm,
  input  logic            rd,
  output logic [31:0]     rdata,
  output logic [31:0]     status
);
  localparam int NW    = (SIGW + 31) / 32;
  localparam int AW    = $clog2(DEPTH);
  localparam int TOTAL = PRE + POST + 1;
  localparam int CW    = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_ARMED, S_POST} state_t;

  state_t          state;
  logic [NW*32-1:0] mem [DEPTH];
  logic [AW-1:0]   wp, start;
  logic [CW-1:0]   cnt;
  logic            triggered, done;
  logic [CW-1:0]   rd_sample;
  logic [$clog2(NW+1)-1:0] rd_word;

  wire match = (((sig ^ value) & ~ignore) == '0);

  always_ff @(posedge clk) begin
    if (state != S_IDLE) mem[wp] <= (NW*32)'(sig);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      wp        <= '0;
      start     <= '0;
      cnt       <= '0;
      triggered <= 1'b0;
      done      <= 1'b0;
      rd_sample <= '0;
      rd_word   <= '0;
    end else if (arm) begin
      state     <= S_FILL;
      cnt       <= '0;
      triggered <= 1'b0;
      done      <= 1'b0;
      rd_sample <= '0;
      rd_word   <= '0;
    end else begin
      if (state != S_IDLE) wp <= wp + 1'b1;
      unique case (state)
        S_IDLE: ;
        S_FILL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PRE - 1)) state <= S_ARMED;
        end
        S_ARMED: if (match) begin
          triggered <= 1'b1;
          start     <= wp - AW'(PRE);
          cnt       <= '0;
          state     <= (POST == 0) ? S_IDLE : S_POST;
          done      <= (POST == 0);
        end
        S_POST: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(POST - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (rd && done) begin
        if (rd_word == $bits(rd_word)'(NW - 1)) begin
          rd_word <= '0;
          if (rd_sample != CW'(TOTAL - 1)) rd_sample <= rd_sample + 1'b1;
        end else begin
          rd_word <= rd_word + 1'b1;
        end
      end
    end
  end

  logic [NW*32-1:0] rd_entry;
  assign rd_entry = mem[start + AW'(rd_sample)];
  assign rdata    = done ? rd_entry[rd_word*32 +: 32] : '0;
  assign status   = {29'b0, done, triggered, state != S_IDLE};

  initial assert (DEPTH >= TOTAL) else $error("trig_scope: DEPTH too small");
endmodule
