// comparator -- BIST comparator of the SerDes test module.
//
// Records what goes into the blocks under test and what comes out, lines the
// two up, and keeps one pass/fail bit per recorded position. Three memories,
// DEPTH entries each: the input memory, the output memory and the result
// register. bist = result[bist_sel] is the chip's bist pin.
//
// Parallel mode (par_en; modes 10-12): in_word is the character entering the
// digital transmitter, stored on in_word_stb; out_word is the character the
// digital receiver decodes, stored on out_word_stb. Comma characters are
// skipped on both sides. The output side starts storing at the first
// character equal to input entry 0.
//
// Serial mode (ser_en; modes 8, 13, 14): in_bit is the bit stream entering
// the digital receiver, out_bit the stream leaving the digital transmitter,
// each with a strobe per bit. The input side shifts bits into a 10-bit
// window until the window equals marker (D1.0 at negative disparity) and from
// then on stores every ten bits as one code; the output side likewise waits
// for a window equal to input entry 0.
//
// In both modes result[k] is set when input and output entry k both exist and
// are equal, and is 0 while either is missing. done rises when both memories
// are full. All state is cleared when par_en or ser_en rises (a BIST mode is
// entered); afterwards the results are held, so they can be read through
// bist_sel after the run. One clk domain; reset asynchronous, active high.
//
// The memories, the synchronisation on the seed and on the 9'h001 marker,
// the 16-entry depth and the bist_sel read-out follow the document. Comparing
// entries only once both exist, skipping commas and holding the results are
// this design's choices. Bit 0 of each shift window is never read: the next
// window (win_*_n) drops it as the new bit enters at the top.
module comparator
  import serdes_pkg::*;
#(
  parameter int unsigned DEPTH = BIST_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              par_en,
  input  logic              ser_en,
  input  logic [3:0]        bist_sel,
  input  logic [CHAR_W-1:0] in_word,
  input  logic              in_word_stb,
  input  logic [CHAR_W-1:0] out_word,
  input  logic              out_word_stb,
  input  logic              in_bit,
  input  logic              in_bit_stb,
  input  logic              out_bit,
  input  logic              out_bit_stb,
  input  logic [CODE_W-1:0] marker,
  output logic              bist,
  output logic [DEPTH-1:0]  result,
  output logic              done
);

  localparam int unsigned AW = $clog2(DEPTH + 1);

  logic [CODE_W-1:0] mem_in  [DEPTH];
  logic [CODE_W-1:0] mem_out [DEPTH];
  logic [AW-1:0]     in_cnt, out_cnt;
  logic [3:0]        in_bits, out_bits;
  logic [CODE_W-1:0] win_in, win_out, win_in_n, win_out_n;
  logic              en_q, start, in_sync, out_sync, in_full, out_full;

  assign start     = (par_en || ser_en) && !en_q;
  assign in_full   = in_cnt == AW'(DEPTH);
  assign out_full  = out_cnt == AW'(DEPTH);
  assign win_in_n  = {in_bit,  win_in[CODE_W-1:1]};
  assign win_out_n = {out_bit, win_out[CODE_W-1:1]};
  assign done      = in_full && out_full;
  assign bist      = result[bist_sel[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      en_q <= 1'b0;
    end else begin
      en_q <= par_en || ser_en;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      in_cnt   <= '0;
      out_cnt  <= '0;
      in_bits  <= '0;
      out_bits <= '0;
      win_in   <= '0;
      win_out  <= '0;
      in_sync  <= 1'b0;
      out_sync <= 1'b0;
      result   <= '0;
      for (int k = 0; k < DEPTH; k++) begin
        mem_in[k]  <= '0;
        mem_out[k] <= '0;
      end
    end else if (start) begin
      in_cnt   <= '0;
      out_cnt  <= '0;
      in_bits  <= '0;
      out_bits <= '0;
      win_in   <= '0;
      win_out  <= '0;
      in_sync  <= 1'b0;
      out_sync <= 1'b0;
      result   <= '0;
      for (int k = 0; k < DEPTH; k++) begin
        mem_in[k]  <= '0;
        mem_out[k] <= '0;
      end
    end else begin
      if (par_en) begin
        // Input side: every non-comma character until the memory is full.
        if (in_word_stb && in_word != COMMA_CHAR && !in_full) begin
          mem_in[in_cnt[AW-2:0]] <= CODE_W'(in_word);
          in_cnt <= in_cnt + 1'b1;
        end
        // Output side: wait for input entry 0, then store in order.
        if (out_word_stb && out_word != COMMA_CHAR && !out_full && in_cnt != '0) begin
          if (out_sync || CODE_W'(out_word) == mem_in[0]) begin
            out_sync <= 1'b1;
            mem_out[out_cnt[AW-2:0]] <= CODE_W'(out_word);
            out_cnt <= out_cnt + 1'b1;
          end
        end
      end else if (ser_en) begin
        if (in_bit_stb && !in_full) begin
          win_in <= win_in_n;
          if (!in_sync) begin
            if (win_in_n == marker) begin
              in_sync   <= 1'b1;
              mem_in[0] <= win_in_n;
              in_cnt    <= AW'(1);
              in_bits   <= '0;
            end
          end else if (in_bits == 4'd9) begin
            mem_in[in_cnt[AW-2:0]] <= win_in_n;
            in_cnt  <= in_cnt + 1'b1;
            in_bits <= '0;
          end else begin
            in_bits <= in_bits + 1'b1;
          end
        end
        if (out_bit_stb && !out_full && in_cnt != '0) begin
          win_out <= win_out_n;
          if (!out_sync) begin
            if (win_out_n == mem_in[0]) begin
              out_sync   <= 1'b1;
              mem_out[0] <= win_out_n;
              out_cnt    <= AW'(1);
              out_bits   <= '0;
            end
          end else if (out_bits == 4'd9) begin
            mem_out[out_cnt[AW-2:0]] <= win_out_n;
            out_cnt  <= out_cnt + 1'b1;
            out_bits <= '0;
          end else begin
            out_bits <= out_bits + 1'b1;
          end
        end
      end

      // Result register: entry k passes when both sides hold it and agree.
      for (int k = 0; k < DEPTH; k++)
        result[k] <= (AW'(k) < in_cnt) && (AW'(k) < out_cnt) && (mem_in[k] == mem_out[k]);
    end
  end

  initial assert (DEPTH == 16) else $error("comparator: bist_sel addresses 16 entries");

endmodule
