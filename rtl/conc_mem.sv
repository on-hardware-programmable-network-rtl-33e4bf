// conc_mem: c-mem, the species concentration registers of a chemical engine.
//
// Every species is a CW-bit register; address 0 is reserved and always
// reads 1 (the identity of the propensity product), so an empty
// stoichiometric record selects it harmlessly. Each cycle the registers
// take, all at once:
//   * one decrement per reactant HLS (dec_en/dec_addr) and one increment
//     per product HLS (inc_en/inc_addr), as driven by the reaction
//     execution logic, one molecule per step;
//   * batched input events: in_valid adds in_amt molecules to in_addr;
//   * batched output events: output port i fires (out_fire, combinational)
//     when out_en is set, out_amt is nonzero and the species holds at least
//     out_amt molecules; the molecules are then removed;
//   * a programming write (wr_en), which overrides everything else for that
//     species.
// Several updates of one species in a cycle are summed; the sum is clamped
// to 0 .. 2^CW-1. Two read ports (rd_*, mon_*) are combinational.
// ext_changed flags a cycle in which events or a write changed the state,
// so that the scheduler can re-evaluate propensities.
// The per-HLS sub/add units follow the species-register circuit of the
// reference design; the batch event ports, the clamping and the summing of
// simultaneous updates are this design's own choices.
module conc_mem
  import ca_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // programming write
  input  logic                wr_en,
  input  logic [SAW-1:0]      wr_addr,
  input  logic [CW-1:0]       wr_data,
  // reaction execution
  input  logic [NPSI-1:0]     dec_en,
  input  logic [SAW-1:0]      dec_addr [NPSI],
  input  logic [NPSI-1:0]     inc_en,
  input  logic [SAW-1:0]      inc_addr [NPSI],
  // external events
  input  logic [N_IN-1:0]     in_valid,
  input  logic [SAW-1:0]      in_addr  [N_IN],
  input  logic [CW-1:0]       in_amt   [N_IN],
  input  logic [N_OUT-1:0]    out_en,
  input  logic [SAW-1:0]      out_addr [N_OUT],
  input  logic [CW-1:0]       out_amt  [N_OUT],
  output logic [N_OUT-1:0]    out_fire,
  // reads
  input  logic [SAW-1:0]      rd_addr,
  output logic [CW-1:0]       rd_data,
  input  logic [SAW-1:0]      mon_addr,
  output logic [CW-1:0]       mon_data,
  output logic                ext_changed
);
  localparam int unsigned DW = CW + 5;   // signed delta width

  logic [CW-1:0]        c_q   [NS+1];
  logic signed [DW-1:0] delta [NS+1];

  function automatic logic [CW-1:0] rd(input logic [SAW-1:0] a);
    return (a == '0) ? CW'(1) : c_q[a];
  endfunction

  assign rd_data  = rd(rd_addr);
  assign mon_data = rd(mon_addr);

  always_comb begin
    for (int i = 0; i < N_OUT; i++) begin
      out_fire[i] = out_en[i] && (out_amt[i] != '0) && (out_addr[i] != '0) &&
                    (c_q[out_addr[i]] >= out_amt[i]);
    end
  end

  assign ext_changed = wr_en || (|in_valid) || (|out_fire);

  always_comb begin
    for (int s = 0; s <= NS; s++) delta[s] = '0;
    for (int h = 0; h < NPSI; h++) begin
      if (dec_en[h]) delta[dec_addr[h]] = delta[dec_addr[h]] - DW'(1);
      if (inc_en[h]) delta[inc_addr[h]] = delta[inc_addr[h]] + DW'(1);
    end
    for (int i = 0; i < N_IN; i++) begin
      if (in_valid[i]) delta[in_addr[i]] = delta[in_addr[i]] + DW'(in_amt[i]);
    end
    for (int i = 0; i < N_OUT; i++) begin
      if (out_fire[i]) delta[out_addr[i]] = delta[out_addr[i]] - DW'(out_amt[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= NS; s++) c_q[s] <= (s == 0) ? CW'(1) : '0;
    end else begin
      for (int s = 1; s <= NS; s++) begin
        logic signed [DW-1:0] nxt;
        nxt = DW'(c_q[s]) + delta[s];
        if (wr_en && wr_addr == SAW'(s)) c_q[s] <= wr_data;
        else if (nxt < 0)                c_q[s] <= '0;
        else if (nxt > DW'({CW{1'b1}}))  c_q[s] <= '1;
        else                             c_q[s] <= nxt[CW-1:0];
      end
    end
  end
endmodule
