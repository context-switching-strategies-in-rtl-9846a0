// md_bin: binary-image context of the motion-detection application.
//
// Started by Calc, it reads the filtered frame from the shared memory word
// by word (two pixels per word), compares each pixel with a fixed threshold
// and sends a word to the output stream in which each byte is 1 if its
// pixel is above the threshold and 0 otherwise. A word is read in one
// clock and offered on the output in the next; it stays offered until
// out_ready takes it, so the context runs at one word per two clocks when
// the output is free. done rises after the last word and stays high until
// calc falls. While en is low (another context active) nothing moves.
//
// The threshold comparison with a static, hard-wired threshold follows the
// application description; the threshold value, the 0/1 byte coding of the
// output and the schedule are this design's choices.
module md_bin #(
  parameter int unsigned W         = 160,
  parameter int unsigned H         = 120,
  parameter int unsigned AW        = 15,
  parameter int unsigned FILT_BASE = 19200,
  parameter logic [7:0]  THRESH    = 8'd16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          calc,
  output logic          done,
  // shared memory
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic [15:0]   mem_rdata,
  // binary image stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic [15:0]   out_data
);
  localparam int unsigned WORDS = W * H / 2;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_OUT} st_e;
  st_e           st;
  logic [AW-1:0] idx;

  assign mem_re    = en && (st == S_RD);
  assign mem_raddr = AW'(FILT_BASE) + idx;
  assign out_valid = en && (st == S_OUT);
  assign out_data  = {7'd0, mem_rdata[15:8] > THRESH, 7'd0, mem_rdata[7:0] > THRESH};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      idx  <= '0;
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
        S_RD: st <= S_OUT;
        S_OUT: if (out_ready) begin
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
