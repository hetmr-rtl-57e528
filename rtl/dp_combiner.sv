// dp_combiner: data-parallel combiner for LANES map pipelines.
//
// When all map pipelines emit the same key set in lock-step, their pairs in
// a cycle share one key. Instead of LANES pipelines competing for the same
// RAM address, an adder tree sums the values of the valid lanes and a single
// combiner_object applies the sum: the address and data multiplexing is
// fixed in advance and no write conflict can occur. An assertion checks that
// all valid lanes present the same key. Attaching one combiner to lanes that
// share their key set follows the design; the registered adder tree (one
// cycle) and the lane count are this implementation's.
//
// Interface: lane_valid[l], lane_key[l], lane_val[l] per pipeline; clear,
// drain, out_* and busy as in combiner_object. Timing: a cycle's lanes reach
// the RAM one cycle later than a single pair would; lanes must be idle while
// busy.
module dp_combiner #(
  parameter int  LANES = 8,
  parameter int  KEYS  = 1024,
  parameter int  VW    = 32,
  localparam int KW    = $clog2(KEYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] lane_valid,
  input  logic [KW-1:0]    lane_key [LANES],
  input  logic [VW-1:0]    lane_val [LANES],
  input  logic             clear,
  input  logic             drain,
  output logic             out_valid,
  output logic [KW-1:0]    out_key,
  output logic [VW-1:0]    out_val,
  output logic             busy,
  output logic [31:0]      bypass_count
);

  logic [VW-1:0] sum;
  logic [KW-1:0] key;
  logic          sum_valid_q;
  logic [KW-1:0] sum_key_q;
  logic [VW-1:0] sum_val_q;

  always_comb begin
    sum = '0;
    key = '0;
    for (int l = 0; l < LANES; l++) begin
      if (lane_valid[l]) begin
        sum = sum + lane_val[l];
        key = lane_key[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_valid_q <= 1'b0;
      sum_key_q   <= '0;
      sum_val_q   <= '0;
    end else begin
      sum_valid_q <= |lane_valid;
      sum_key_q   <= key;
      sum_val_q   <= sum;
    end
  end

  combiner_object #(.KEYS(KEYS), .VW(VW)) u_obj (
    .clk, .rst_n,
    .in_valid(sum_valid_q), .in_key(sum_key_q), .in_val(sum_val_q),
    .clear, .drain, .out_valid, .out_key, .out_val, .busy, .bypass_count
  );

  // all valid lanes carry the same key
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < LANES; l++)
        a_same_key: assert (!lane_valid[l] || lane_key[l] == key)
          else $error("dp_combiner: lane %0d key differs", l);
    end
  end

endmodule
