// dwt2d_image: image memory and row/column sequencer that applies the
// one-dimensional three-level DWT (analysis) or its inverse (synthesis) to a
// whole COLS x ROWS image, first along every row, then along every column.
//
// How it works. The block owns the image memory (one byte per pixel,
// row-major, address = row*COLS + column) and a line buffer of
// L = max(COLS, ROWS) bytes. For each line it
//   1. LOAD:  copies the line from the image memory into the line buffer
//             (one byte per clock, synchronous-read memory);
//   2. CLR:   holds the 1-D cores in reset for one clock, so every line is
//             transformed with zero history, like an isolated signal;
//   3. RUN:   streams the line through the selected core, one sample per
//             sample period, and writes the core output straight back into
//             the same line of the image memory (safe, because the line
//             itself is already in the buffer).
// Analysis writes the coefficients of a line in sub-band order: with line
// length n the third-stage low-pass v occupies positions 0 .. n/8-1, the
// third-stage high-pass u n/8 .. n/4-1, the second-stage high-pass r
// n/4 .. n/2-1 and the first-stage high-pass o n/2 .. n-1. The analysis
// stream produces o(c-1) in odd periods c, r(c-2) when c mod 4 = 2, u(c-4)
// when c mod 8 = 4 and v(c-8) when c mod 8 = 0, so periods 1 .. n deliver
// exactly the n coefficients. Synthesis reads the same positions back to
// rebuild that interleaved stream, feeds zeros after period n, and keeps
// the outputs of periods SYN_DLY .. SYN_DLY+n-1 as samples 0 .. n-1
// (SYN_DLY = 33 is the analysis-to-synthesis delay of the folded pair for
// low-frequency content).
//
// Data format: the memory holds offset-binary bytes (pixel values, and
// coefficients + 128); the MSB is inverted on the way into and out of the
// two's-complement cores.
//
// Interface and timing:
//   start   one-clock request, accepted when not busy; inverse (sampled
//           with start) selects synthesis instead of analysis
//   busy    high from the clock after start until done
//   done    one-clock pulse when both passes are complete
//   h_*     host access to the image memory, only while not busy:
//           h_we writes h_wdata at h_addr; h_rdata returns the byte at
//           the h_addr of the previous clock
//   core_rst_n  active-low reset for the two 1-D cores (also low while
//               rst_n is low)
//   a_din / a_dout, s_din / s_dout, smp_end  connection to the analysis
//               and synthesis cores (four clocks per sample, smp_end on the
//               last); a_din is the line sample in period c, s_din the
//               interleaved coefficient stream in period c
// A full analysis or synthesis takes about ROWS*(COLS + 4*COLS) +
// COLS*(ROWS + 4*ROWS) clocks (plus 4*SYN_DLY per line for synthesis).
//
// Following the design: image memory of COLS x ROWS pixels (640 x 480 by
// default), a line buffer of length max(COLS, ROWS), rows before columns,
// the 1-D modules restarted for every line, sub-band write-back and the
// offset-binary conversion. This design's own choices: the implementation
// as a hardware sequencer with one single-port memory, the host port, the
// LOAD/CLR/RUN schedule, and the output delay value.
module dwt2d_image
  import dwt_pkg::*;
#(
  parameter int COLS    = 640,
  parameter int ROWS    = 480,
  parameter int SYN_DLY = 33,
  localparam int NPIX   = COLS * ROWS,
  localparam int MAW    = $clog2(NPIX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           inverse,
  output logic           busy,
  output logic           done,
  input  logic           h_we,
  input  logic [MAW-1:0] h_addr,
  input  logic [7:0]     h_wdata,
  output logic [7:0]     h_rdata,
  output logic           core_rst_n,
  output sample_t        a_din,
  input  sample_t        a_dout,
  output sample_t        s_din,
  input  sample_t        s_dout,
  input  logic           smp_end
);

  localparam int L   = (COLS > ROWS) ? COLS : ROWS;
  localparam int PW  = $clog2(L + SYN_DLY + 1);   // period / position counter
  localparam int LNW = $clog2(L);                 // line index / buffer index

  typedef logic [PW-1:0] pos_t;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CLR, S_RUN, S_NEXT} state_t;

  state_t          state;
  logic            inv, col_pass, line_rst_n;
  logic [LNW-1:0]  line;
  pos_t            k, c, len, last;

  logic [7:0]      mem [NPIX];
  logic [7:0]      lbuf [L];
  logic            m_we;
  logic [MAW-1:0]  m_addr;
  logic [7:0]      m_wd, m_q;

  // --- address of position p of the current line ---
  function automatic logic [MAW-1:0] line_addr(logic cp, logic [LNW-1:0] ln, pos_t p);
    int unsigned a;
    a = cp ? (int'(p) * COLS + int'(ln)) : (int'(ln) * COLS + int'(p));
    return MAW'(a);
  endfunction

  // --- sub-band position of the coefficient delivered in period cc (1..n) ---
  function automatic pos_t band_pos(pos_t cc, pos_t n);
    if (cc[0])              return pos_t'((n >> 1) + (cc >> 1));
    else if (cc[1])         return pos_t'((n >> 2) + (cc >> 2));
    else if (cc[2])         return pos_t'((n >> 3) + (cc >> 3));
    else                    return pos_t'((cc >> 3) - 1'b1);
  endfunction

  assign len  = col_pass ? pos_t'(ROWS) : pos_t'(COLS);
  assign last = inv ? pos_t'(len + pos_t'(SYN_DLY) - 1'b1) : len;

  // --- core inputs: line sample / interleaved coefficient of period c ---
  pos_t   rd_pos;
  logic   syn_has;
  logic   ana_wr, syn_wr;

  assign rd_pos  = band_pos(c, len);
  assign syn_has = (c != '0) && (c <= len);
  assign a_din   = (!inv && c < len)  ? sample_t'({~lbuf[c[LNW-1:0]][7], lbuf[c[LNW-1:0]][6:0]}) : '0;
  assign s_din   = (inv && syn_has)   ? sample_t'({~lbuf[rd_pos[LNW-1:0]][7], lbuf[rd_pos[LNW-1:0]][6:0]}) : '0;

  assign ana_wr  = !inv && (c != '0) && (c <= len);
  assign syn_wr  = inv && (c >= pos_t'(SYN_DLY));

  // --- image memory port: host when idle, sequencer otherwise ---
  always_comb begin
    m_we   = 1'b0;
    m_addr = h_addr;
    m_wd   = h_wdata;
    unique case (state)
      S_IDLE: m_we = h_we;
      S_LOAD: m_addr = line_addr(col_pass, line, (k < len) ? k : '0);
      S_RUN: begin
        m_we = smp_end && (ana_wr || syn_wr);
        if (inv) begin
          m_addr = line_addr(col_pass, line, pos_t'(c - pos_t'(SYN_DLY)));
          m_wd   = {~s_dout[7], s_dout[6:0]};
        end else begin
          m_addr = line_addr(col_pass, line, rd_pos);
          m_wd   = {~a_dout[7], a_dout[6:0]};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wd;
    m_q <= mem[m_addr];
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && k != '0) lbuf[LNW'(k - 1'b1)] <= m_q;
  end

  assign h_rdata    = m_q;
  assign busy       = (state != S_IDLE);
  assign core_rst_n = rst_n & line_rst_n;

  // --- line sequencer ---
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      inv        <= 1'b0;
      col_pass   <= 1'b0;
      line       <= '0;
      k          <= '0;
      c          <= '0;
      line_rst_n <= 1'b1;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          inv      <= inverse;
          col_pass <= 1'b0;
          line     <= '0;
          k        <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          if (k == len) begin
            line_rst_n <= 1'b0;
            state      <= S_CLR;
          end
          k <= k + 1'b1;
        end
        S_CLR: begin
          line_rst_n <= 1'b1;
          c          <= '0;
          state      <= S_RUN;
        end
        S_RUN: if (smp_end) begin
          c <= c + 1'b1;
          if (c == last) state <= S_NEXT;
        end
        S_NEXT: begin
          k     <= '0;
          state <= S_LOAD;
          if (int'(line) == int'(col_pass ? COLS : ROWS) - 1) begin
            line <= '0;
            if (col_pass) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              col_pass <= 1'b1;
            end
          end else begin
            line <= line + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
