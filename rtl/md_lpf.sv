// md_lpf: low-pass filter context of the motion-detection application.
//
// Started by Calc, it smooths the difference image with a 4x4 averaging
// filter: output pixel (r, c) is the sum of input pixels in rows r..r+3 and
// columns c..c+3, shifted right by 4 (truncated mean of 16 pixels). Rows and
// columns past the last one are replaced by the last one. The image is
// read from and written back to the shared memory, two pixels per word.
//
// For each output word (pixels 2w and 2w+1 of a row) it reads a window of
// 4 rows x 3 words (columns 2w..2w+5) in 12 consecutive clocks, waits one
// clock for the last word, and writes the two averages in the next: 14
// clocks per word, 134,400 per 160x120 frame. done rises after the last
// word and stays high until calc falls. While en is low nothing moves.
//
// The 4x4 averaging filter on the difference image follows the application
// description; the window alignment, edge handling, rounding and schedule
// are this design's choices.
module md_lpf #(
  parameter int unsigned W         = 160,
  parameter int unsigned H         = 120,
  parameter int unsigned AW        = 15,
  parameter int unsigned DIFF_BASE = 9600,
  parameter int unsigned FILT_BASE = 19200
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          calc,
  output logic          done,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic [15:0]   mem_rdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [15:0]   mem_wdata
);
  localparam int unsigned WW = W / 2;   // words per row

  typedef enum logic [1:0] {S_IDLE, S_RD, S_LAST, S_WR} st_e;
  st_e            st;
  logic [15:0]    r, c;                 // output row, output word in row
  logic [3:0]     k;                    // window word being read, 0..11
  logic [AW-1:0]  widx;                 // output word index
  logic [15:0]    win [12];             // window words, index dr*3 + dc

  logic [15:0]    rd_row, rd_col;
  logic [7:0]     avg [2];

  // Address of window word k: row r + k/3, word c + k%3, both clamped
  always_comb begin
    rd_row = r + 16'(k / 3);
    rd_col = c + 16'(k % 3);
    if (rd_row > 16'(H - 1))  rd_row = 16'(H - 1);
    if (rd_col > 16'(WW - 1)) rd_col = 16'(WW - 1);
  end

  assign mem_re    = en && (st == S_RD);
  assign mem_raddr = AW'(DIFF_BASE) + AW'(rd_row * 16'(WW)) + AW'(rd_col);
  assign mem_we    = en && (st == S_WR);
  assign mem_waddr = AW'(FILT_BASE) + widx;
  assign mem_wdata = {avg[1], avg[0]};

  // The two averages from the 4 x 6 pixel window
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [11:0] sum;
      sum = '0;
      for (int dr = 0; dr < 4; dr++) begin
        for (int j = 0; j < 4; j++) begin
          int col, fi;
          col = 2 * int'(c) + p + j;
          if (col > int'(W) - 1) col = int'(W) - 1;
          fi  = col / 2 - int'(c);
          sum = sum + 12'(col[0] ? win[dr*3 + fi][15:8] : win[dr*3 + fi][7:0]);
        end
      end
      avg[p] = sum[11:4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      r    <= '0;
      c    <= '0;
      k    <= '0;
      widx <= '0;
      done <= 1'b0;
      for (int i = 0; i < 12; i++) win[i] <= '0;
    end else if (en) begin
      unique case (st)
        S_IDLE: begin
          if (!calc) done <= 1'b0;
          else if (!done) begin
            st   <= S_RD;
            r    <= '0;
            c    <= '0;
            k    <= '0;
            widx <= '0;
          end
        end
        S_RD: begin
          if (k != 0) win[k - 1] <= mem_rdata;
          if (k == 4'd11) st <= S_LAST;
          else k <= k + 1'b1;
        end
        S_LAST: begin
          win[11] <= mem_rdata;
          st      <= S_WR;
        end
        S_WR: begin
          k <= '0;
          if (widx == AW'(W * H / 2 - 1)) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            widx <= widx + 1'b1;
            st   <= S_RD;
            if (c == 16'(WW - 1)) begin
              c <= '0;
              r <= r + 1'b1;
            end else c <= c + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
