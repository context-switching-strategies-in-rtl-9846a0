// md_diff: difference context of the motion-detection application.
//
// Started by Calc, it takes one frame from the input stream, two 8-bit
// pixels per 16-bit word (even column in the low byte). For each word it
// reads the previous frame's word from the shared memory, writes the
// per-pixel absolute difference |I(i) - I(i-1)| to the difference region
// and then writes the current word over the previous frame, so the memory
// holds I(i) for the next frame. When the last word is written, done rises
// and stays high until calc falls; then the context is ready for the next
// frame. Each word takes three clocks (read, write difference, write
// current) plus any wait for the input stream.
//
// en is high while this context is the device's active context; while it
// is low nothing moves and every register keeps its value, as the private
// registers of an inactive context do.
//
// The absolute difference and keeping the previous frame in device memory
// follow the application description; the memory layout, the byte order
// within a word, the three-clock schedule and the calc/done handshake
// details are this design's choices.
module md_diff #(
  parameter int unsigned W       = 160,
  parameter int unsigned H       = 120,
  parameter int unsigned AW      = 15,
  parameter int unsigned PREV_BASE = 0,
  parameter int unsigned DIFF_BASE = 9600
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          calc,
  output logic          done,
  // current frame stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [15:0]   in_data,
  // shared memory
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic [15:0]   mem_rdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [15:0]   mem_wdata
);
  localparam int unsigned WORDS = W * H / 2;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WDIFF, S_WCUR} st_e;
  st_e          st;
  logic [AW-1:0] idx;
  logic [15:0]  cur;

  function automatic logic [7:0] absdiff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  assign in_ready  = en && (st == S_RD);
  assign mem_re    = en && (st == S_RD) && in_valid;
  assign mem_raddr = AW'(PREV_BASE) + idx;
  assign mem_we    = en && (st == S_WDIFF || st == S_WCUR);
  assign mem_waddr = (st == S_WDIFF) ? AW'(DIFF_BASE) + idx : AW'(PREV_BASE) + idx;
  assign mem_wdata = (st == S_WDIFF) ? {absdiff(cur[15:8], mem_rdata[15:8]),
                                        absdiff(cur[7:0],  mem_rdata[7:0])}
                                     : cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      idx  <= '0;
      cur  <= '0;
      done <= 1'b0;
    end else if (en) begin
      unique case (st)
        S_IDLE: begin
          if (!calc) done <= 1'b0;
          else if (!done) begin
            st  <= S_RD;
            idx <= '0;
          end
        end
        S_RD: if (in_valid) begin
          cur <= in_data;
          st  <= S_WDIFF;
        end
        S_WDIFF: st <= S_WCUR;
        S_WCUR: begin
          if (idx == AW'(WORDS - 1)) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
            st  <= S_RD;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
