09000
2D000
22000
