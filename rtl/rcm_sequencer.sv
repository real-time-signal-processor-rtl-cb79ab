// rcm_sequencer: control sequencer of the result collection module.
//
// A counter chain clocked continuously (16 MHz) runs the collection:
//   rate section   (8 bits)  divides the clock: one tick every RATE+1 clocks;
//   state counter  (3 bits)  eight states per result location;
//   address counter (18 bits) walks SRAM-B from LOWER to UPPER;
//   node sequencer           steps through the programmed node sequence.
// 8 + 3 + 18 = 29 bits. At RATE = 0 one 32-bit location takes 8 clocks
// (8 Mbytes/s at 16 MHz); at RATE = 255 it takes 2048 clocks (31.25 kbytes/s).
//
// Handshake with a node: while polling, the sequencer looks at the BUS-FREE
// line of the node the sequence points to. If it is active, the sequencer
// raises that node's ENGAGED line and reads the range: for each address the
// states are 0 address out, 1-3 OE asserted (data latched at the end of
// state 3), 4 low half written to the FIFO, 6 high half written, 7 next
// address. After UPPER it drops ENGAGED and moves to the next node in the
// sequence. A node is not engaged again until it has dropped BUS-FREE (its
// processor does so after the ENGAGED interrupt). If BUS-FREE is inactive
// the sequencer polls the next node; with no node ready it keeps polling.
//
// Node sequence pattern (this design's encoding): eight 4-bit entries,
// entry k in bits 4k+3:4k, each {valid, node[2:0]}; the sequence is the
// entries up to the first invalid one, so the pattern fixes both the number
// of nodes and their order. The sequence is held in a shift register that
// reloads from the pattern when it runs out.
//
// The state-by-state use of the eight states and the half order (low half
// first) are this design's choice; the counter chain widths, the rates and
// the handshake follow the module's description.
module rcm_sequencer #(
  parameter int unsigned NNODES = 8,
  parameter int unsigned AW     = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acquire_enable,
  input  logic [7:0]        rate,
  input  logic [AW-1:0]     lower,
  input  logic [AW-1:0]     upper,
  input  logic [31:0]       nodeseq,
  input  logic [NNODES-1:0] busfree,
  input  logic [31:0]       result_data,
  output logic [NNODES-1:0] engaged,
  output logic [NNODES-1:0] oe,
  output logic [AW-1:0]     result_addr,
  output logic              fifo_wr,
  output logic [15:0]       fifo_wdata,
  output logic [$clog2(NNODES)-1:0] cur_node,
  output logic              node_done      // pulse: a node's range was read
);

  typedef enum logic [1:0] {S_IDLE, S_POLL, S_XFER} mode_t;

  mode_t             mode;
  logic [7:0]        presc;
  logic [2:0]        st;
  logic [31:0]       seq_sr;
  logic [31:0]       seq_next;
  logic [NNODES-1:0] busfree_s1, busfree_s2;
  logic [NNODES-1:0] done;
  logic [31:0]       data_reg;
  logic              tick;

  localparam int unsigned NW = $clog2(NNODES);

  assign cur_node = seq_sr[NW-1:0];
  assign tick     = (presc == rate);
  assign seq_next = seq_sr[7] ? (seq_sr >> 4) : nodeseq;

  always_comb begin
    oe = '0;
    if (mode == S_XFER && st >= 3'd1 && st <= 3'd3) oe[cur_node] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= S_IDLE;
      presc       <= '0;
      st          <= '0;
      seq_sr      <= '0;
      busfree_s1  <= '0;
      busfree_s2  <= '0;
      done        <= '0;
      engaged     <= '0;
      result_addr <= '0;
      data_reg    <= '0;
      fifo_wr     <= 1'b0;
      fifo_wdata  <= '0;
      node_done   <= 1'b0;
    end else begin
      busfree_s1 <= busfree;
      busfree_s2 <= busfree_s1;
      done       <= done & busfree_s2;   // forget a node once it drops BUS-FREE
      fifo_wr    <= 1'b0;
      node_done  <= 1'b0;
      unique case (mode)
        S_IDLE: begin
          if (acquire_enable && nodeseq[3]) begin
            seq_sr <= nodeseq;
            mode   <= S_POLL;
          end
        end
        S_POLL: begin
          if (!acquire_enable) begin
            mode <= S_IDLE;
          end else if (busfree_s2[cur_node] && !done[cur_node]) begin
            engaged[cur_node] <= 1'b1;
            result_addr       <= lower;
            st                <= '0;
            presc             <= '0;
            mode              <= S_XFER;
          end else begin
            seq_sr <= seq_next;
          end
        end
        S_XFER: begin
          presc <= tick ? '0 : presc + 1'b1;
          if (tick) begin
            st <= st + 1'b1;
            unique case (st)
              3'd3: data_reg <= result_data;
              3'd4: begin fifo_wr <= 1'b1; fifo_wdata <= data_reg[15:0];  end
              3'd6: begin fifo_wr <= 1'b1; fifo_wdata <= data_reg[31:16]; end
              3'd7: begin
                if (result_addr == upper) begin
                  engaged[cur_node] <= 1'b0;
                  done[cur_node]    <= 1'b1;
                  node_done         <= 1'b1;
                  seq_sr            <= seq_next;
                  mode              <= S_POLL;
                end else begin
                  result_addr <= result_addr + 1'b1;
                end
              end
              default: ;
            endcase
          end
        end
        default: mode <= S_IDLE;
      endcase
    end
  end

  a_one_engaged: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(engaged))
    else $error("rcm_sequencer: more than one node engaged");
  a_oe_engaged: assert property (@(posedge clk) disable iff (!rst_n) (oe & ~engaged) == '0)
    else $error("rcm_sequencer: OE without ENGAGED");

endmodule
