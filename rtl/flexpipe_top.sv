// flexpipe_top: the FlexPipe SmartNIC packet-processing pipeline.
//
// Packets from the network enter the Pre-Processor, which classifies them into
// flow types and attaches metadata naming the packet's offload chain. The
// Ingress Traffic Controller feeds them, together with recirculated packets,
// into six Offloads connected directly one after another in the order CRC,
// firewall, SHA-3, AES, JPEG decoder, RSS. Each Offload either processes a
// packet (when it is the packet's next required offload), steering it to the
// least loaded of its Offload Units, or lets it bypass. The Egress Traffic
// Controller sends packets whose chain is complete to the DMA Engine and
// recirculates the rest for another pass.
//
// The Offload Units and the DMA Engine are not part of this module. Every unit
// of every Offload has an AXI4-Stream pair on the flat arrays unit_in_* (unit
// fetches its packet, one 512-bit fragment per handshake) and unit_out_* (unit
// returns the processed packet with its metadata unchanged); unit u of offload
// k sits at index base_of(NUM_UNITS, k) + u. dma_out_* goes to the DMA Engine. cfg_* are
// the write ports of the classification and chain tables (the SDN
// controller's path). All ports are in the 250 MHz pipeline clock domain.
//
// The block structure, the offload order, the unit counts (8, 128, 39, 4, 40,
// 3) and the 512-bit width follow the pipeline's design; queue depths other
// than the 16 kB queues, the metadata layout and the handshakes between blocks
// are this design's choices (see the block headers).
module flexpipe_top
  import flexpipe_pkg::*;
#(
  parameter uint_arr_t   NUM_UNITS    = UNIT_COUNT,
  parameter int unsigned Q_DEPTH      = 256,
  parameter int unsigned UNIT_Q_DEPTH = 32,
  parameter int unsigned RECIRC_DEPTH = 256,
  parameter int unsigned FLOW_ENTRIES = 16,
  parameter int unsigned NUM_FLOWS    = 16,
  localparam int unsigned TOTAL = total_units(NUM_UNITS),
  localparam int unsigned FEW   = $clog2(FLOW_ENTRIES),
  localparam int unsigned NFW   = $clog2(NUM_FLOWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // network side
  input  logic              net_in_valid,
  output logic              net_in_ready,
  input  axis_beat_t        net_in_beat,
  // DMA Engine side
  output logic              dma_out_valid,
  input  logic              dma_out_ready,
  output axis_beat_t        dma_out_beat,
  // table configuration
  input  logic              cfg_flow_we,
  input  logic [FEW-1:0]    cfg_flow_addr,
  input  flow_entry_t       cfg_flow_entry,
  input  logic              cfg_chain_we,
  input  logic [NFW-1:0]    cfg_chain_addr,
  input  chain_entry_t      cfg_chain_entry,
  // Offload Units of all Offloads
  output logic [TOTAL-1:0]  unit_in_valid,
  input  logic [TOTAL-1:0]  unit_in_ready,
  output axis_beat_t        unit_in_beat  [TOTAL],
  input  logic [TOTAL-1:0]  unit_out_valid,
  output logic [TOTAL-1:0]  unit_out_ready,
  input  axis_beat_t        unit_out_beat [TOTAL],
  output logic [TS_W-1:0]   now
);

  // ---------------- Pre-Processor ----------------
  logic       pp_valid, pp_ready;
  axis_beat_t pp_beat;

  pre_processor #(.FLOW_ENTRIES(FLOW_ENTRIES), .NUM_FLOWS(NUM_FLOWS)) u_pre (
    .clk, .rst_n,
    .in_valid(net_in_valid), .in_ready(net_in_ready), .in_beat(net_in_beat),
    .out_valid(pp_valid), .out_ready(pp_ready), .out_beat(pp_beat),
    .cfg_flow_we, .cfg_flow_addr, .cfg_flow_entry,
    .cfg_chain_we, .cfg_chain_addr, .cfg_chain_entry,
    .now);

  // ---------------- Ingress Traffic Controller ----------------
  logic       st_valid [NUM_OFFLOADS+1];
  logic       st_ready [NUM_OFFLOADS+1];
  axis_beat_t st_beat  [NUM_OFFLOADS+1];
  logic       rec_valid, rec_ready, ing_is_rec;
  axis_beat_t rec_beat;

  ingress_traffic_controller #(.RECIRC_DEPTH(RECIRC_DEPTH)) u_ingress (
    .clk, .rst_n,
    .net_valid(pp_valid), .net_ready(pp_ready), .net_beat(pp_beat),
    .rec_valid, .rec_ready, .rec_beat,
    .out_valid(st_valid[0]), .out_ready(st_ready[0]), .out_beat(st_beat[0]),
    .out_is_rec(ing_is_rec));

  // ---------------- Offloads ----------------
  for (genvar k = 0; k < NUM_OFFLOADS; k++) begin : g_off
    localparam int unsigned N    = NUM_UNITS[k];
    localparam int unsigned BASE = base_of(NUM_UNITS, k);

    logic [N-1:0] ui_valid, ui_ready, uo_valid, uo_ready;
    axis_beat_t   ui_beat [N];
    axis_beat_t   uo_beat [N];

    offload #(.OFFLOAD_ID(k), .NUM_UNITS(N), .Q_DEPTH(Q_DEPTH),
              .UNIT_Q_DEPTH(UNIT_Q_DEPTH)) u_offload (
      .clk, .rst_n,
      .in_valid(st_valid[k]), .in_ready(st_ready[k]), .in_beat(st_beat[k]),
      .out_valid(st_valid[k+1]), .out_ready(st_ready[k+1]), .out_beat(st_beat[k+1]),
      .unit_in_valid(ui_valid), .unit_in_ready(ui_ready), .unit_in_beat(ui_beat),
      .unit_out_valid(uo_valid), .unit_out_ready(uo_ready), .unit_out_beat(uo_beat));

    for (genvar u = 0; u < N; u++) begin : g_unit
      assign unit_in_valid[BASE+u]  = ui_valid[u];
      assign ui_ready[u]            = unit_in_ready[BASE+u];
      assign unit_in_beat[BASE+u]   = ui_beat[u];
      assign uo_valid[u]            = unit_out_valid[BASE+u];
      assign unit_out_ready[BASE+u] = uo_ready[u];
      assign uo_beat[u]             = unit_out_beat[BASE+u];
    end
  end

  // ---------------- Egress Traffic Controller ----------------
  egress_traffic_controller u_egress (
    .clk, .rst_n,
    .in_valid(st_valid[NUM_OFFLOADS]), .in_ready(st_ready[NUM_OFFLOADS]),
    .in_beat(st_beat[NUM_OFFLOADS]),
    .dma_valid(dma_out_valid), .dma_ready(dma_out_ready), .dma_beat(dma_out_beat),
    .rec_valid, .rec_ready, .rec_beat);

endmodule
