// dual_clock_ram: simple dual-port RAM, one write port and one read port on
// separate clocks, written so that FPGA tools infer a block RAM (M10K).
//
// Write: mem[write_address] <= d on a rising clk1 edge when we is high.
// Read: read_address is registered on clk2, and q is registered from the
// registered address, so q shows the word addressed two clk2 edges earlier
// (read latency 2). DEPTH defaults to (30+2)^2 = 1024 words, a 30x30 image
// with a one-pixel border.
module dual_clock_ram #(
  parameter int unsigned WIDTH = 27,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = 11
) (
  input  logic                    clk1,
  input  logic                    clk2,
  input  logic                    we,
  input  logic [AW-1:0]           write_address,
  input  logic [AW-1:0]           read_address,
  input  logic signed [WIDTH-1:0] d,
  output logic signed [WIDTH-1:0] q
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic signed [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] read_address_reg;

  // addresses at or above DEPTH: writes are dropped, reads return 0
  always_ff @(posedge clk1) begin
    if (we && write_address < AW'(DEPTH)) mem[IW'(write_address)] <= d;
  end

  always_ff @(posedge clk2) begin
    read_address_reg <= read_address;
    q <= (read_address_reg < AW'(DEPTH)) ? mem[IW'(read_address_reg)] : '0;
  end
endmodule
