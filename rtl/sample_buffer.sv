// sample_buffer: first-in first-out memory of whole vectors, used as the
// z-buffer (input vectors z^0) and as the t-buffer (desired outputs t).
//
// The host writes one complete vector per clock with wr_en while full is low.
// The head entry is always visible on rd_data (first-word fall-through); rd_en
// removes it at the clock edge. A write and a read may happen in the same
// clock. count gives the number of stored vectors. Reset empties the buffer;
// the storage itself is not cleared.
// The two buffers and their role follow the architecture; the FIFO
// organisation, the whole-vector write port and the depth are this design's
// choices.
module sample_buffer
  import nn_pkg::*;
#(
  parameter int N     = N0_DEF,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  fx_t                      wr_data [N],
  input  logic                     rd_en,
  output fx_t                      rd_data [N],
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fx_t           mem [DEPTH][N];
  logic [PW-1:0] wr_ptr, rd_ptr;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en && !full)  wr_ptr <= next_ptr(wr_ptr);
      if (rd_en && !empty) rd_ptr <= next_ptr(rd_ptr);
      case ({wr_en && !full, rd_en && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign rd_data = mem[rd_ptr];

  // Handshake rules: the user never writes a full or reads an empty buffer.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(wr_en && full))  else $error("sample_buffer: write while full");
      assert (!(rd_en && empty)) else $error("sample_buffer: read while empty");
    end
  end

endmodule
