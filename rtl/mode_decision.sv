// mode_decision: first step for every BAB. It reads the 16 rows of the
// current BAB from the BAB memory, one per cycle, and classifies the block
// as all transparent, all opaque or boundary; the rows are also collected
// into 'bab' for the later stages (memory words hold the leftmost pixel in
// the MSB; bab[y][x] has x = 0 at the left). Interface: 'start', then a synchronous-
// read memory port (data one cycle after rd_en); 'done' is high in the 18th cycle
// after the start cycle, with 'cls' and 'bab' valid. The 16-cycle row scan matches the
// source's 16 cycles for mode decision; classification is exact (lossless),
// which is this design's choice.
module mode_decision
  import shape_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        rd_en,
  output logic [3:0]  rd_addr,
  input  logic [15:0] rd_data,
  output bab_class_e  cls,
  output bab_t        bab,
  output logic        busy,
  output logic        done
);
  logic       run, rd_d;
  logic [3:0] row, row_d;
  logic       all0, all1;

  assign rd_en   = run;
  assign rd_addr = row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; row <= '0; rd_d <= 1'b0; row_d <= '0;
      all0 <= 1'b1; all1 <= 1'b1; bab <= '0; done <= 1'b0; cls <= CLS_TRANSP;
    end else begin
      done  <= 1'b0;
      rd_d  <= rd_en;
      row_d <= row;
      if (start && !run && !rd_d) begin
        run <= 1'b1; row <= '0; all0 <= 1'b1; all1 <= 1'b1;
      end else if (run) begin
        row <= row + 4'd1;
        if (row == 4'd15) run <= 1'b0;
      end
      if (rd_d) begin
        for (int x = 0; x < 16; x++) bab[row_d][x] <= rd_data[15-x];
        all0 <= all0 && (rd_data == 16'h0000);
        all1 <= all1 && (rd_data == 16'hFFFF);
        if (row_d == 4'd15) begin
          done <= 1'b1;
          cls  <= (all0 && rd_data == 16'h0000) ? CLS_TRANSP :
                  (all1 && rd_data == 16'hFFFF) ? CLS_OPAQUE : CLS_BOUNDARY;
        end
      end
    end
  end

  assign busy = run || rd_d;
endmodule
