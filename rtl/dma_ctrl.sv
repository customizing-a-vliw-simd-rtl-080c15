// dma_ctrl: DMA controller between an external memory (or audio buffer) and
// the data memory.
//
// The core programs it through three co-processor stores: the external word
// address, the local data-memory address, and a control word ([15:0] number
// of words, [16] direction: 0 = external to local, 1 = local to external),
// whose store starts the transfer. The busy flag can be read back. Words are
// moved one at a time. External to local: request the word on the external
// bus, hold it when ext_ack_i arrives, then write it to the data memory as
// soon as mem_gnt_i grants the port. Local to external: read the word from
// the data memory when granted, then write it on the external bus until
// acknowledged. The document names a DMA controller for reading an audio
// buffer and talking to an external memory; the register map, the bus and
// the word-by-word protocol are this design's.
//
// External bus: ext_req_o stays high with ext_we_o/addr/wdata stable until
// ext_ack_i; read data is taken in the acknowledge cycle.
module dma_ctrl
  import asip_pkg::word_t;
#(
  parameter int unsigned AW  = 14,   // data memory word address
  parameter int unsigned EAW = 32    // external word address
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration from the core
  input  logic           cfg_we_i,
  input  logic [1:0]     cfg_addr_i,   // 0 external addr, 1 local addr, 2 control
  input  logic [31:0]    cfg_wdata_i,
  output logic           busy_o,
  // data memory port
  output logic           mem_req_o,
  output logic           mem_we_o,
  output logic [AW-1:0]  mem_addr_o,
  output word_t          mem_wdata_o,
  input  word_t          mem_rdata_i,
  input  logic           mem_gnt_i,
  // external bus
  output logic           ext_req_o,
  output logic           ext_we_o,
  output logic [EAW-1:0] ext_addr_o,
  output word_t          ext_wdata_o,
  input  word_t          ext_rdata_i,
  input  logic           ext_ack_i
);

  typedef enum logic [1:0] {IDLE, EXT, LOC} state_e;

  state_e         state_q;
  logic [EAW-1:0] ext_q;
  logic [AW-1:0]  loc_q;
  logic [15:0]    cnt_q;
  logic           dir_q;      // 1: local to external
  word_t          buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      ext_q   <= '0;
      loc_q   <= '0;
      cnt_q   <= '0;
      dir_q   <= 1'b0;
      buf_q   <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (cfg_we_i) begin
          unique case (cfg_addr_i)
            2'd0: ext_q <= EAW'(cfg_wdata_i);
            2'd1: loc_q <= AW'(cfg_wdata_i);
            2'd2: if (cfg_wdata_i[15:0] != 0) begin
              cnt_q   <= cfg_wdata_i[15:0];
              dir_q   <= cfg_wdata_i[16];
              state_q <= cfg_wdata_i[16] ? LOC : EXT;
            end
            default: ;
          endcase
        end
        EXT: if (ext_ack_i) begin
          if (!dir_q) begin
            buf_q   <= ext_rdata_i;
            state_q <= LOC;
          end else begin
            ext_q   <= ext_q + 1'b1;
            loc_q   <= loc_q + 1'b1;
            cnt_q   <= cnt_q - 1'b1;
            state_q <= (cnt_q == 16'd1) ? IDLE : LOC;
          end
        end
        LOC: if (mem_gnt_i) begin
          if (dir_q) begin
            buf_q   <= mem_rdata_i;
            state_q <= EXT;
          end else begin
            ext_q   <= ext_q + 1'b1;
            loc_q   <= loc_q + 1'b1;
            cnt_q   <= cnt_q - 1'b1;
            state_q <= (cnt_q == 16'd1) ? IDLE : EXT;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy_o      = (state_q != IDLE);
  assign mem_req_o   = (state_q == LOC);
  assign mem_we_o    = (state_q == LOC) && !dir_q;
  assign mem_addr_o  = loc_q;
  assign mem_wdata_o = buf_q;
  assign ext_req_o   = (state_q == EXT);
  assign ext_we_o    = dir_q;
  assign ext_addr_o  = ext_q;
  assign ext_wdata_o = buf_q;

  // the external request must stay up until acknowledged
  property p_ext_hold;
    @(posedge clk) disable iff (!rst_n) ext_req_o && !ext_ack_i |=> ext_req_o && $stable(ext_addr_o);
  endproperty
  assert property (p_ext_hold);

endmodule
