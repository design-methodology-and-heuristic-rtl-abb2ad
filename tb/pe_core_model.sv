// pe_core_model -- behavioural stand-in for the processor inside a PE, used
// only by testbenches. It takes one word, works on it for LAT cycles and
// offers word+1 until it is taken; it takes no new word before then. With
// LAT_RAND set, each word takes 1..LAT cycles instead.
module pe_core_model #(
  parameter int LAT      = 3,
  parameter bit LAT_RAND = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready
);
  logic busy;
  int   cnt;

  assign in_ready  = !busy;
  assign out_valid = busy && (cnt == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; out_data <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy     <= 1'b1;
        out_data <= in_data + 32'd1;
        cnt      <= LAT_RAND ? int'($urandom % LAT) : LAT - 1;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
    end else if (out_ready) begin
      busy <= 1'b0;
    end
  end
endmodule
