// window_addr_gen: read-address sequencer for 3x3 windows over a padded image.
//
// The image is stored row-major with a row pitch of W = ISIZE+2 words. For
// each of the ISIZE x ISIZE window positions, in raster order, it issues the
// nine addresses of the window, one per clock, top row first:
//   +1, +1, +(W-2), +1, +1, +(W-2), +1, +1
// and then jumps to the first word of the next window: -(2W+1) (one column
// right) or, after the last column, -(2W-1) (first column of the next row).
// Alongside each address it reports the tap number (0..8), the window index
// and the address of the window's centre word, so a consumer that delays
// these fields by the memory latency knows where each returned word goes.
//
// Timing: while en is high one address per cycle is valid; after the last
// tap of the last window valid drops and done rises. en low returns the
// sequencer to the first window (synchronous), as does rst.
module window_addr_gen #(
  parameter int unsigned ISIZE = 30,
  parameter int unsigned AW    = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [AW-1:0] rd_addr,
  output logic [3:0]    tap,
  output logic [AW-1:0] win_idx,
  output logic [AW-1:0] center_addr,
  output logic          valid,
  output logic          last,     // last tap of the last window
  output logic          row_wrap, // last tap of a window ending a row
  output logic          done
);
  localparam int unsigned W = ISIZE + 2;

  logic [$clog2(ISIZE+1)-1:0] col, row;

  assign valid    = en && !done;
  assign row_wrap = (tap == 4'd8) && (col == ($bits(col))'(ISIZE - 1));
  assign last     = row_wrap && (row == ($bits(row))'(ISIZE - 1));

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      rd_addr     <= '0;
      tap         <= '0;
      col         <= '0;
      row         <= '0;
      win_idx     <= '0;
      center_addr <= AW'(W + 1);
      done        <= 1'b0;
    end else if (!done) begin
      case (tap)
        4'd2, 4'd5: begin
          rd_addr <= rd_addr + AW'(W - 2);
          tap     <= tap + 4'd1;
        end
        4'd8: begin
          tap     <= '0;
          win_idx <= win_idx + 1'b1;
          if (last) begin
            done <= 1'b1;
          end else if (row_wrap) begin
            rd_addr     <= rd_addr - AW'(2 * W - 1);
            center_addr <= center_addr + AW'(3);
            col         <= '0;
            row         <= row + 1'b1;
          end else begin
            rd_addr     <= rd_addr - AW'(2 * W + 1);
            center_addr <= center_addr + AW'(1);
            col         <= col + 1'b1;
          end
        end
        default: begin
          rd_addr <= rd_addr + AW'(1);
          tap     <= tap + 4'd1;
        end
      endcase
    end
  end
endmodule
