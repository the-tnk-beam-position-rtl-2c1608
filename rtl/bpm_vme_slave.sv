// bpm_vme_slave: VME register interface of the ADC module.
//
// The results go over the VME bus to the crate's VME controller, which also
// sets up the processing. This slave decodes an A24 address against the
// board's base address, synchronises the bus strobes to the processing
// clock, performs one 32-bit register read or write per data strobe and
// answers with DTACK*, which it holds until the master releases DS*.
// Registers (word index; byte address = base + 4*index):
//   0  ID (read only)         1  NCO frequency word      2  samples per turn
//   3  turns per SA value     4  SA sequence count (read only, +1 per SA)
//   8 + 4*c + w  SA data of channel c, 32-bit word w = 0..2 (low first)
//   24 + 2*c + w turn-by-turn data of channel c, word w = 0..1 (low first)
// Reporting over VME is the system's; the whole protocol subset (single
// D32 transfers, one data strobe, no interrupts, no block transfers) and the
// register map are this design's own. SA and turn-by-turn registers are
// updated for all channels together when new values arrive; the SA sequence
// count lets software see that a multi-word value was not updated between
// its reads.
//
// Timing: DTACK* falls about 3 clocks after AS* and DS* are both low (two
// synchroniser stages and one access clock) and rises 3 clocks after DS* rises.
module bpm_vme_slave
  import bpm_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR = 24'h10_0000
)(
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (active-low strobes)
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [23:2] vme_addr,    // longword address (A24, D32)
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // settings
  output phase_t      nco_freq_o,
  output spt_t        spt_o,
  output turns_t      sa_turns_o,
  // results
  input  logic        tbt_valid_i,
  input  sumsq_t      tbt_i [NUM_CH],
  input  logic        sa_valid_i,
  input  sa_t         sa_i [NUM_CH]
);

  typedef enum logic [1:0] {S_IDLE, S_ACK, S_WAIT_REL} state_e;

  state_e      state_q;
  logic [2:0]  as_sync, ds_sync, wr_sync;   // [2] is the synchronised value
  logic        as_act, ds_act, write_act, selected;
  logic [4:0]  idx;
  logic [31:0] rdata;
  sa_t         sa_q  [NUM_CH];
  sumsq_t      tbt_q [NUM_CH];
  logic [31:0] sa_seq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= '1;
      ds_sync <= '1;
      wr_sync <= '1;
    end else begin
      as_sync <= {as_sync[1:0], vme_as_n};
      ds_sync <= {ds_sync[1:0], vme_ds_n};
      wr_sync <= {wr_sync[1:0], vme_write_n};
    end
  end

  assign as_act    = !as_sync[2] && !as_sync[1];
  assign ds_act    = !ds_sync[2] && !ds_sync[1];
  assign write_act = !wr_sync[2];
  assign selected  = (vme_addr[23:7] == BASE_ADDR[23:7]);
  assign idx       = vme_addr[6:2];

  // Read multiplexer.
  always_comb begin
    rdata = '0;
    unique case (idx) inside
      REG_ID:       rdata = BPM_ID;
      REG_NCO_FREQ: rdata = nco_freq_o;
      REG_SPT:      rdata = 32'(spt_o);
      REG_SA_TURNS: rdata = 32'(sa_turns_o);
      REG_SA_SEQ:   rdata = sa_seq_q;
      [5'd8:5'd23]: begin
        automatic logic [1:0] c = 2'((idx - REG_SA_BASE) >> 2);
        automatic logic [1:0] w = 2'(idx - REG_SA_BASE);
        automatic logic [95:0] wide = 96'(sa_q[c]);
        if (w != 2'd3) rdata = wide[32*w +: 32];
      end
      [5'd24:5'd31]: begin
        automatic logic [1:0] c = 2'((idx - REG_TBT_BASE) >> 1);
        automatic logic       w = 1'(idx - REG_TBT_BASE);
        automatic logic [63:0] wide = 64'(tbt_q[c]);
        rdata = wide[32*w +: 32];
      end
      default:      rdata = '0;
    endcase
  end

  // Bus handshake and register writes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      vme_dtack_n <= 1'b1;
      vme_data_oe <= 1'b0;
      vme_data_o  <= '0;
      nco_freq_o  <= NCO_FREQ_DEFAULT;
      spt_o       <= SPT_W'(SPT_DEFAULT);
      sa_turns_o  <= TURNS_W'(SA_TURNS_DEFAULT);
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (as_act && ds_act && selected) begin
            if (write_act) begin
              unique case (idx)
                REG_NCO_FREQ: nco_freq_o <= vme_data_i;
                REG_SPT:      spt_o      <= vme_data_i[SPT_W-1:0];
                REG_SA_TURNS: sa_turns_o <= vme_data_i[TURNS_W-1:0];
                default: ;
              endcase
            end else begin
              vme_data_o  <= rdata;
              vme_data_oe <= 1'b1;
            end
            vme_dtack_n <= 1'b0;
            state_q     <= S_ACK;
          end
        end
        S_ACK: begin
          if (ds_sync[2] && ds_sync[1]) begin
            vme_dtack_n <= 1'b1;
            vme_data_oe <= 1'b0;
            state_q     <= S_WAIT_REL;
          end
        end
        S_WAIT_REL: begin
          // Wait for the strobes to be seen released before a new cycle.
          if (ds_sync[2] || as_sync[2]) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Result registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_seq_q <= '0;
      for (int c = 0; c < NUM_CH; c++) begin
        sa_q[c]  <= '0;
        tbt_q[c] <= '0;
      end
    end else begin
      if (sa_valid_i) begin
        sa_seq_q <= sa_seq_q + 32'd1;
        for (int c = 0; c < NUM_CH; c++) sa_q[c] <= sa_i[c];
      end
      if (tbt_valid_i)
        for (int c = 0; c < NUM_CH; c++) tbt_q[c] <= tbt_i[c];
    end
  end

  // DTACK* is only driven low while the master's data strobe is (or was
  // just) asserted: never in idle.
  a_dtack_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 state_q == S_IDLE |-> vme_dtack_n);
  // Read data is driven only during an acknowledged cycle.
  a_oe_ack:     assert property (@(posedge clk) disable iff (!rst_n)
                                 vme_data_oe |-> !vme_dtack_n);

endmodule
