// combiner_object: a k2 combiner on a dual-port block RAM.
//
// The RAM holds one accumulated value per key. Port A is read-only and
// port B write-only. A pair (k2,v2) arriving in cycle t puts k2 on address A
// (read in cycle t); in cycle t+1 the previous value comes out on data A,
// the combiner function c1 (addition here) adds v2, and the sum is written
// through address B / data B / enable B. One pair per cycle is accepted,
// whatever the keys. Because the write of cycle t+1 and the read of the next
// pair happen at the same clock edge, a pair that follows one with the same
// key would read the old value; a one-entry bypass then substitutes the sum
// being written (bypass_count counts these). The read-at-t/write-at-t+1
// structure and the port roles follow the design; the bypass, addition as
// c1, and the clear/drain sequencers are this implementation's.
//
// clear (pulse) zeroes all KEYS entries through port B, one per cycle;
// drain (pulse) reads all entries in key order through port A and presents
// them on out_valid/out_key/out_val, one per cycle. in_valid must stay low
// while busy. Reset does not clear the RAM: pulse clear before first use.
module combiner_object #(
  parameter int  KEYS = 1024,
  parameter int  VW   = 32,
  localparam int KW   = $clog2(KEYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [KW-1:0] in_key,
  input  logic [VW-1:0] in_val,
  input  logic          clear,
  input  logic          drain,
  output logic          out_valid,
  output logic [KW-1:0] out_key,
  output logic [VW-1:0] out_val,
  output logic          busy,
  output logic [31:0]   bypass_count
);

  logic [VW-1:0] ram [KEYS];

  // port A (read-only)
  logic [KW-1:0] addr_a;
  logic [VW-1:0] data_a;
  // port B (write-only)
  logic          en_b;
  logic [KW-1:0] addr_b;
  logic [VW-1:0] data_b;

  // stage 2 (cycle t+1) of the pair that arrived in cycle t
  logic          s2_valid_q;
  logic [KW-1:0] s2_key_q;
  logic [VW-1:0] s2_val_q;
  // value written at the last edge, for the bypass
  logic          wb_valid_q;
  logic [KW-1:0] wb_key_q;
  logic [VW-1:0] wb_val_q;
  logic [VW-1:0] prev;

  // clear / drain sequencers
  logic          clearing_q, draining_q, drain_out_q;
  logic [KW-1:0] seq_q, drain_key_q;

  assign busy = clearing_q || draining_q || drain_out_q;

  assign addr_a = draining_q ? seq_q : in_key;

  always_ff @(posedge clk) begin
    data_a <= ram[addr_a];
    if (en_b) ram[addr_b] <= data_b;
  end

  assign prev = (wb_valid_q && wb_key_q == s2_key_q) ? wb_val_q : data_a;

  always_comb begin
    if (clearing_q) begin
      en_b   = 1'b1;
      addr_b = seq_q;
      data_b = '0;
    end else begin
      en_b   = s2_valid_q;
      addr_b = s2_key_q;
      data_b = prev + s2_val_q;   // c1
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid_q   <= 1'b0;
      s2_key_q     <= '0;
      s2_val_q     <= '0;
      wb_valid_q   <= 1'b0;
      wb_key_q     <= '0;
      wb_val_q     <= '0;
      clearing_q   <= 1'b0;
      draining_q   <= 1'b0;
      drain_out_q  <= 1'b0;
      seq_q        <= '0;
      drain_key_q  <= '0;
      bypass_count <= '0;
    end else begin
      s2_valid_q <= in_valid && !busy;
      s2_key_q   <= in_key;
      s2_val_q   <= in_val;
      wb_valid_q <= s2_valid_q && !clearing_q;
      wb_key_q   <= s2_key_q;
      wb_val_q   <= data_b;
      if (s2_valid_q && wb_valid_q && wb_key_q == s2_key_q)
        bypass_count <= bypass_count + 1;

      drain_out_q <= draining_q;
      drain_key_q <= seq_q;
      if (clearing_q || draining_q) begin
        seq_q <= seq_q + 1'b1;
        if (seq_q == KW'(KEYS - 1)) begin
          clearing_q <= 1'b0;
          draining_q <= 1'b0;
        end
      end else if (clear) begin
        clearing_q <= 1'b1;
        seq_q      <= '0;
      end else if (drain) begin
        draining_q <= 1'b1;
        seq_q      <= '0;
      end
    end
  end

  assign out_valid = drain_out_q;
  assign out_key   = drain_key_q;
  assign out_val   = data_a;

  a_no_input_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("combiner_object: pair dropped while clearing or draining");

endmodule
